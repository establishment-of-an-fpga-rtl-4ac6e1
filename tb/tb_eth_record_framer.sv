// tb_eth_record_framer -- self-checking test of the record-to-Ethernet
// framer.
//
// Random records go in; eth_frame_monitor takes every frame apart and
// compares it with the record it names. The test uses non-default addresses
// and EtherType. It runs in three phases:
//   1. ready always high: the first byte comes the cycle after rec_valid,
//      a frame is 60 consecutive bytes, and tx_last is on the 60th;
//   2. ready random (about half the cycles), records 300 cycles apart: no
//      record is lost and data holds while it waits;
//   3. records 25 cycles apart with ready high: every record that comes
//      during a frame is dropped, and the sequence numbers show the gaps.
// In the end frames + drops must equal records.
module tb_eth_record_framer;
  import im_setup_pkg::*;

  localparam logic [47:0] DST = 48'h00_1B_21_3C_4D_5E;
  localparam logic [47:0] SRC = 48'h02_AB_CD_EF_01_23;
  localparam logic [15:0] ETY = 16'h88B6;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       rec_valid = 1'b0, tx_ready = 1'b1;
  record_t    rec = '0;
  logic [7:0] tx_data;
  logic       tx_valid, tx_last, busy, drop;
  int         checks = 0, failures = 0;
  int         m_checks, m_failures, m_frames, m_drops, m_records;
  int         n_drop_phase3 = 0;

  always #5 clk = ~clk;

  eth_record_framer #(.DST_MAC(DST), .SRC_MAC(SRC), .ETHERTYPE(ETY)) dut (
    .clk, .rst_n, .rec_valid, .rec, .tx_data, .tx_valid, .tx_last, .tx_ready, .busy, .drop
  );

  eth_frame_monitor #(.DST_MAC(DST), .SRC_MAC(SRC), .ETHERTYPE(ETY)) mon (
    .clk, .rst_n, .rec_valid, .rec, .tx_data, .tx_valid, .tx_last, .tx_ready, .drop,
    .checks(m_checks), .failures(m_failures), .frames(m_frames), .drops(m_drops),
    .records(m_records)
  );

  function automatic record_t rand_rec();
    logic [351:0] r;
    for (int k = 0; k < 11; k++) r[32*k +: 32] = $urandom;
    return record_t'(r);
  endfunction

  task automatic send();
    rec       <= rand_rec();
    rec_valid <= 1'b1;
    @(posedge clk);
    rec_valid <= 1'b0;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  end

  initial begin
    int len;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (3) @(posedge clk);

    // phase 1: timing with ready held high
    for (int n = 0; n < 20; n++) begin
      send();
      checks++;
      #1;
      if (!tx_valid) begin failures++; $display("FAIL no frame the cycle after rec_valid"); end
      len = 0;
      while (tx_valid) begin
        len++;
        checks++;
        if (tx_last != (len == 60)) begin failures++; $display("FAIL tx_last at byte %0d", len); end
        checks++;
        if (!busy) begin failures++; $display("FAIL busy low during a frame"); end
        @(posedge clk); #1;
      end
      checks++;
      if (len != 60) begin failures++; $display("FAIL frame took %0d cycles", len); end
      repeat ($urandom_range(0, 5)) @(posedge clk);
    end

    // phase 2: back-pressure
    fork
      begin
        for (int n = 0; n < 200; n++) begin
          send();
          repeat (299) @(posedge clk);
        end
      end
      begin
        repeat (200 * 300) begin
          tx_ready <= ($urandom_range(0, 1) == 1);
          @(posedge clk);
        end
      end
    join
    tx_ready <= 1'b1;
    repeat (200) @(posedge clk);
    checks++;
    if (m_drops != 0) begin failures++; $display("FAIL %0d drops without overload", m_drops); end

    // phase 3: records faster than frames
    for (int n = 0; n < 100; n++) begin
      send();
      repeat (24) @(posedge clk);
    end
    repeat (200) @(posedge clk);
    n_drop_phase3 = m_drops;
    checks++;
    if (n_drop_phase3 < 50) begin failures++; $display("FAIL only %0d drops under overload", n_drop_phase3); end

    checks++;
    if (m_frames + m_drops != m_records) begin
      failures++;
      $display("FAIL %0d frames + %0d drops != %0d records", m_frames, m_drops, m_records);
    end
    $display("records %0d, frames %0d, drops %0d", m_records, m_frames, m_drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks + m_checks, failures + m_failures);
    $finish;
  end
endmodule
