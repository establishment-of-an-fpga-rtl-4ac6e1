// quad_decoder -- four-times quadrature decoder for an incremental encoder.
//
// The encoder's A and B tracks (already shifted to the FPGA's 3.3 V levels)
// are asynchronous, so each passes a two-flop synchroniser. Every change of
// either track is one count: in the Gray sequence 00 -> 01 -> 11 -> 10 (B,A)
// the count goes up, in the reverse sequence down. A step in which both tracks
// change at once has no direction; it is not counted and `glitch` pulses.
//
// Interface: `step` pulses for one cycle per counted edge, `dir` = 1 up.
// Timing: two cycles of synchroniser plus one of edge detection.
module quad_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic enc_a,
  input  logic enc_b,
  output logic step,
  output logic dir,
  output logic glitch
);
  logic [1:0] sync_a, sync_b;
  logic [1:0] prev, curr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_a <= '0;
      sync_b <= '0;
      prev   <= '0;
    end else begin
      sync_a <= {sync_a[0], enc_a};
      sync_b <= {sync_b[0], enc_b};
      prev   <= curr;
    end
  end

  assign curr = {sync_b[1], sync_a[1]};

  always_comb begin
    step   = 1'b0;
    dir    = 1'b0;
    glitch = 1'b0;
    unique case ({prev, curr})
      4'b00_01, 4'b01_11, 4'b11_10, 4'b10_00: begin step = 1'b1; dir = 1'b1; end
      4'b00_10, 4'b10_11, 4'b11_01, 4'b01_00: begin step = 1'b1; dir = 1'b0; end
      4'b00_11, 4'b11_00, 4'b01_10, 4'b10_01: glitch = 1'b1;
      default: ;
    endcase
  end
endmodule
