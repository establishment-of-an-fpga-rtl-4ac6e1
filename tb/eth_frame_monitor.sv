// eth_frame_monitor -- checks the raw Ethernet frames that carry the sample
// records to the host.
//
// It numbers every record seen on rec_valid, starting at 0, and keeps a copy.
// It collects every byte accepted on the valid/ready stream. At tx_last it
// takes the frame apart and checks these things:
//   - the length is 60 bytes;
//   - the destination address, source address and EtherType are as
//     configured;
//   - the sequence number names a record that was seen and is higher than
//     the one before;
//   - the 44 payload bytes equal that record's eleven fields, big-endian.
// It also counts the `drop` pulses. A record must either reach a frame or be
// dropped, so the caller can check that frames + drops = records.
//
// checks/failures/frames/drops are running counts for the caller to sum.
module eth_frame_monitor #(
  parameter logic [47:0] DST_MAC   = 48'hFF_FF_FF_FF_FF_FF,
  parameter logic [47:0] SRC_MAC   = 48'h02_00_00_00_00_01,
  parameter logic [15:0] ETHERTYPE = 16'h88B5,
  parameter bit          VERBOSE   = 1'b0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  rec_valid,
  input  im_setup_pkg::record_t rec,
  input  logic [7:0]            tx_data,
  input  logic                  tx_valid,
  input  logic                  tx_last,
  input  logic                  tx_ready,
  input  logic                  drop,
  output int                    checks,
  output int                    failures,
  output int                    frames,
  output int                    drops,
  output int                    records
);
  im_setup_pkg::record_t seen [int];
  byte unsigned          bytes [$];
  int                    last_seq = -1;

  initial begin
    checks = 0; failures = 0; frames = 0; drops = 0; records = 0;
  end

  function automatic logic [47:0] get48(int at);
    logic [47:0] v = '0;
    for (int k = 0; k < 6; k++) v = {v[39:0], bytes[at + k]};
    return v;
  endfunction

  task automatic check_frame();
    int          seq;
    logic [351:0] r;
    logic [31:0]  w, got;
    checks++;
    if (bytes.size() != 60) begin
      failures++;
      $display("FAIL frame %0d: %0d bytes", frames, bytes.size());
      return;
    end
    checks += 3;
    if (get48(0) != DST_MAC) begin failures++; $display("FAIL frame %0d: destination %h", frames, get48(0)); end
    if (get48(6) != SRC_MAC) begin failures++; $display("FAIL frame %0d: source %h", frames, get48(6)); end
    if ({bytes[12], bytes[13]} != ETHERTYPE) begin
      failures++; $display("FAIL frame %0d: EtherType %h", frames, {bytes[12], bytes[13]});
    end
    seq = int'({bytes[14], bytes[15]});
    checks++;
    if (!seen.exists(seq) || seq <= last_seq) begin
      failures++;
      $display("FAIL frame %0d: sequence %0d (previous %0d)", frames, seq, last_seq);
      return;
    end
    last_seq = seq;
    r = seen[seq];
    for (int f = 0; f < 11; f++) begin
      w   = r[351 - 32*f -: 32];
      got = {bytes[16 + 4*f], bytes[17 + 4*f], bytes[18 + 4*f], bytes[19 + 4*f]};
      checks++;
      if (got !== w) begin
        failures++;
        $display("FAIL frame %0d (record %0d) field %0d: %h, expected %h", frames, seq, f, got, w);
      end
    end
    if (VERBOSE) $display("frame %0d carries record %0d", frames, seq);
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (rec_valid) begin
        seen[records] = rec;
        records++;
      end
      if (drop) drops++;
      if (tx_valid && tx_ready) begin
        bytes.push_back(tx_data);
        if (tx_last) begin
          check_frame();
          frames++;
          bytes.delete();
        end else if (bytes.size() >= 60) begin
          failures++;
          $display("FAIL frame %0d: no end after 60 bytes", frames);
          bytes.delete();
        end
      end
    end
  end
endmodule
