// adc_spi_master -- conversion and SPI read-out controller for the ADS8568
// eight-channel, 16-bit simultaneous-sampling ADC.
//
// One `start` pulse runs one complete acquisition, following the ADC's serial
// timing diagram: CONVST is raised to sample all eight channels at once; the
// controller waits for BUSY to rise and fall again (conversion), waits the
// BUSY-low to FS-low time, pulls FS low and clocks out 32 bits on each of the
// four SDO lines with SCLK. Every SDO line carries two channels back to back,
// MSB first: SDO_A = A0 then A1, SDO_B = B0, B1, SDO_C = C0, C1, SDO_D = D0,
// D1. A bit is sampled on the system clock edge that drives SCLK low, i.e.
// while the ADC still holds it (the ADC changes SDO after the falling edge).
// FS then returns high and the controller holds off for the FS-to-CONVST time
// before it reports `done` and accepts the next start.
//
// Interface: codes[n] is channel n in the order A0, A1, B0, B1, C0, C1, D0,
// D1, two's complement, valid from the `done` pulse until the next one.
// `timeout` is raised with `done` if BUSY did not rise or fall in time; the
// codes of that acquisition are then stale.
//
// Timing: every limit is a count of system clock cycles (10 ns at the
// 100 MHz default), chosen to meet the ADC's limits: CONVST high 40 ns,
// BUSY-low to FS-low 90 ns (>= 86 ns), SCLK period 40 ns (>= 22 ns,
// <= 10 us), FS-high to CONVST 40 ns (>= 40 ns). The acquisition time
// (>= 280 ns from BUSY low to the next CONVST) is always met, because the
// read-out alone lasts 32 SCLK periods. BUSY is asynchronous and passes a
// two-flop synchroniser. With a 1.7 us conversion one acquisition takes
// about 3.1 us.
// The signal order, the bit order and the limits are the ADC's; the cycle
// counts, the timeouts and the error flag are choices of this design.
module adc_spi_master #(
  parameter int CVH_CYC       = 4,     // CONVST high time
  parameter int BUFS_CYC      = 9,     // BUSY low to FS low
  parameter int SCLK_HALF_CYC = 2,     // half SCLK period
  parameter int FSCV_CYC      = 4,     // FS high to next CONVST
  parameter int BUSY_RISE_MAX = 16,    // BUSY must rise within this
  parameter int CONV_MAX_CYC  = 400    // BUSY must fall within this
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             convst,
  input  logic             busy,
  output logic             fs_n,
  output logic             sclk,
  input  logic [3:0]       sdo,        // SDO_A .. SDO_D in bits 0 .. 3
  output logic [7:0][15:0] codes,
  output logic             done,
  output logic             timeout,
  output logic             active
);
  typedef enum logic [2:0] {
    S_IDLE, S_CONVST, S_WAIT_BUSY, S_CONVERT, S_BUFS, S_SHIFT, S_FSCV
  } state_t;

  state_t      state;
  logic [1:0]  busy_sync;
  logic [15:0] cnt;
  logic [5:0]  bit_cnt;
  logic [3:0][31:0] shreg;
  logic        err;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy_sync <= '0;
    else        busy_sync <= {busy_sync[0], busy};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      convst  <= 1'b0;
      fs_n    <= 1'b1;
      sclk    <= 1'b1;
      cnt     <= '0;
      bit_cnt <= '0;
      shreg   <= '0;
      codes   <= '0;
      done    <= 1'b0;
      timeout <= 1'b0;
      err     <= 1'b0;
    end else begin
      done <= 1'b0;
      cnt  <= cnt + 16'd1;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            convst <= 1'b1;
            cnt    <= '0;
            err    <= 1'b0;
            state  <= S_CONVST;
          end
        end
        S_CONVST: begin
          if (int'(cnt) == CVH_CYC - 1) begin
            convst <= 1'b0;
          end
          if (busy_sync[1]) begin
            cnt   <= '0;
            state <= S_CONVERT;
          end else if (int'(cnt) >= BUSY_RISE_MAX) begin
            err   <= 1'b1;
            cnt   <= '0;
            state <= S_FSCV;
          end
        end
        S_CONVERT: begin
          if (int'(cnt) == CVH_CYC - 1) convst <= 1'b0;
          if (!busy_sync[1]) begin
            convst <= 1'b0;
            cnt    <= '0;
            state  <= S_BUFS;
          end else if (int'(cnt) >= CONV_MAX_CYC) begin
            convst <= 1'b0;
            err    <= 1'b1;
            cnt    <= '0;
            state  <= S_FSCV;
          end
        end
        S_BUFS: begin
          if (int'(cnt) == BUFS_CYC - 1) begin
            fs_n    <= 1'b0;
            cnt     <= '0;
            bit_cnt <= '0;
            state   <= S_SHIFT;
          end
        end
        S_SHIFT: begin
          if (int'(cnt) == SCLK_HALF_CYC - 1) begin
            cnt <= '0;
            if (sclk) begin
              if (bit_cnt == 6'd32) begin
                fs_n  <= 1'b1;
                state <= S_FSCV;
              end else begin
                sclk <= 1'b0;
                for (int l = 0; l < 4; l++) shreg[l] <= {shreg[l][30:0], sdo[l]};
                bit_cnt <= bit_cnt + 6'd1;
              end
            end else begin
              sclk <= 1'b1;
            end
          end
        end
        S_FSCV: begin
          if (int'(cnt) == FSCV_CYC - 1) begin
            if (!err) begin
              for (int l = 0; l < 4; l++) begin
                codes[2*l]   <= shreg[l][31:16];
                codes[2*l+1] <= shreg[l][15:0];
              end
            end
            timeout <= err;
            done    <= 1'b1;
            state   <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign active = (state != S_IDLE);

  // handshake rules of the serial interface
  a_fs_only_after_conv: assert property (@(posedge clk) disable iff (!rst_n)
    $fell(fs_n) |-> !busy_sync[1]);
  a_sclk_only_in_frame: assert property (@(posedge clk) disable iff (!rst_n)
    $fell(sclk) |-> !fs_n);
  a_no_convst_in_frame: assert property (@(posedge clk) disable iff (!rst_n)
    $rose(convst) |-> fs_n);
endmodule
