// ads8568_model -- behavioural model (not synthesizable) of the serial side
// of the ADS8568 eight-channel simultaneous-sampling ADC, for testbenches.
//
// On a rising CONVST it latches the eight input codes `vin` (A0, A1, B0, B1,
// C0, C1, D0, D1), raises BUSY after T_DCVB and lowers it t_conv after CONVST;
// `sampled` shows the codes of the latest conversion. On a
// falling FS it drives the MSB of each 32-bit frame (SDO_A = A0:A1, ...,
// SDO_D = D0:D1) after T_DMSB, and after every falling SCLK edge it moves to
// the next bit, T_HDO later. It also checks the host's side of the timing
// table and counts each violation in `violations`: CONVST low >= 20,
// BUSY low to FS low >= 86, FS high to CONVST >= 40, SCLK period >= 22,
// acquisition (BUSY low to CONVST high) >= 280, no SCLK edge outside a frame.
// Delay units are nanoseconds (the testbenches use a 10-unit clock period).
// `respond` = 0 makes the ADC ignore CONVST, to test the host's timeout.
module ads8568_model #(
  parameter int T_DCVB = 20,
  parameter int T_DMSB = 10,
  parameter int T_HDO  = 6
) (
  input  logic             convst,
  input  logic             fs_n,
  input  logic             sclk,
  output logic             busy,
  output logic [3:0]       sdo,
  input  logic [7:0][15:0] vin,
  input  logic             respond,
  input  int               t_conv,
  output logic [7:0][15:0] sampled,
  output int               violations,
  output int               conversions
);
  logic [3:0][31:0] frame;
  int   bitpos;
  time  t_busy_fall, t_convst_fall, t_fs_rise, t_sclk_fall;

  initial begin
    sampled = '0;
    busy = 1'b0; sdo = '0; violations = 0; conversions = 0; bitpos = 0;
    t_busy_fall = 0; t_convst_fall = 0; t_fs_rise = 0; t_sclk_fall = 0;
  end

  always @(negedge convst) t_convst_fall = $time;

  always @(posedge convst) begin
    if (conversions > 0) begin
      if ($time - t_convst_fall < 20)  violations++;
      if ($time - t_fs_rise < 40)      violations++;
      if ($time - t_busy_fall < 280)   violations++;
    end
    if (respond && !busy) begin
      for (int l = 0; l < 4; l++) frame[l] = {vin[2*l], vin[2*l+1]};
      sampled = vin;
      conversions++;
      #(T_DCVB) busy = 1'b1;
      #(t_conv - T_DCVB) busy = 1'b0;
      t_busy_fall = $time;
    end
  end

  always @(negedge fs_n) begin
    if ($time - t_busy_fall < 86 || busy) violations++;
    bitpos = 31;
    #(T_DMSB);
    for (int l = 0; l < 4; l++) sdo[l] = frame[l][31];
  end

  always @(posedge fs_n) t_fs_rise = $time;

  always @(negedge sclk) begin
    if (fs_n) violations++;
    if (t_sclk_fall != 0 && $time - t_sclk_fall < 22) violations++;
    t_sclk_fall = $time;
    #(T_HDO);
    if (bitpos > 0) begin
      bitpos = bitpos - 1;
      for (int l = 0; l < 4; l++) sdo[l] = frame[l][bitpos];
    end
  end
endmodule
