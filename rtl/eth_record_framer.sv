// eth_record_framer -- packs each sample record into one raw Ethernet frame
// for the host computer.
//
// The host receives the measured quantities and the model's results as raw
// Ethernet frames, with no IP or UDP layer. An Ethernet MAC core sends them
// and adds the preamble and the frame check sequence. This module builds the
// bytes it hands to that core. Each frame is exactly 60 bytes, the minimum
// frame size without the check sequence, so the MAC has nothing to pad:
//
//   bytes  0..5   destination address (DST_MAC)
//   bytes  6..11  source address (SRC_MAC)
//   bytes 12..13  EtherType (ETHERTYPE)
//   bytes 14..15  record sequence number
//   bytes 16..59  the eleven binary32 fields of the record, in declaration
//                 order (v_sa first)
//
// All multi-byte fields are big-endian, most significant byte first.
//
// The sequence number counts every record that arrives, including dropped
// ones, so the host can see a lost record as a gap in the numbers.
//
// The byte interface is a valid/ready stream. tx_data is accepted when
// tx_valid and tx_ready are both high, and tx_last marks byte 59. A frame
// starts the cycle after its rec_valid pulse. With tx_ready held high it
// takes 60 cycles, far less than one sample period. A record that arrives
// while a frame is still being sent is not stored: it is counted, and `drop`
// pulses for one cycle.
//
// Following the source setup: records travel as raw Ethernet frames, one
// per sample. This design's own choices: the framing, the field order, the
// sequence number, the EtherType default (0x88B5, reserved for local
// experiments), the locally administered source address, the stream
// handshake, and dropping a record rather than queueing it.
module eth_record_framer #(
  parameter logic [47:0] DST_MAC   = 48'hFF_FF_FF_FF_FF_FF,
  parameter logic [47:0] SRC_MAC   = 48'h02_00_00_00_00_01,
  parameter logic [15:0] ETHERTYPE = 16'h88B5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  rec_valid,
  input  im_setup_pkg::record_t rec,
  output logic [7:0]            tx_data,
  output logic                  tx_valid,
  output logic                  tx_last,
  input  logic                  tx_ready,
  output logic                  busy,
  output logic                  drop
);
  localparam int NBYTES = 60;
  localparam int NBITS  = 8 * NBYTES;

  logic [NBITS-1:0] frame_q;
  logic [5:0]       left;     // bytes still to send, including the current one
  logic [15:0]      seq;

  // the record width is fixed by the frame layout
  if ($bits(im_setup_pkg::record_t) != NBITS - 128) begin : g_bad_record
    $error("record does not fill the 44-byte payload");
  end

  assign tx_data  = frame_q[NBITS-1 -: 8];
  assign tx_valid = (left != 6'd0);
  assign tx_last  = (left == 6'd1);
  assign busy     = tx_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame_q <= '0;
      left    <= '0;
      seq     <= '0;
      drop    <= 1'b0;
    end else begin
      drop <= 1'b0;
      if (tx_valid && tx_ready) begin
        frame_q <= {frame_q[NBITS-9:0], 8'h00};
        left    <= left - 6'd1;
      end
      if (rec_valid) begin
        seq <= seq + 16'd1;
        if (!tx_valid) begin
          frame_q <= {DST_MAC, SRC_MAC, ETHERTYPE, seq, rec};
          left    <= 6'(NBYTES);
        end else begin
          drop <= 1'b1;
        end
      end
    end
  end

  // stream rules: data stays put while it waits for ready
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_data) && $stable(tx_last));
endmodule
