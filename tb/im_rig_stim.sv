// im_rig_stim -- stand-in for the motor rig and its transducers in the
// top-level testbenches.
//
// Produces the ADC input codes a running machine would give: 50 Hz
// three-phase stator voltages of 310 V peak and currents of `i_amp` peak
// (lagging 30 degrees), and the torque `torque` with +/-0.5 N.m of noise, each
// divided by its transducer gain and quantised as code = volts * 32767 / 10.
// It also turns the encoder of a 5000-line encoder at `rpm` (negative:
// backwards) as A/B quadrature signals; `glitch` flips both tracks at once.
// Units: 1 time unit = 1 ns.
module im_rig_stim #(
  parameter real V_GAIN  = 100.0,
  parameter real I_GAIN  = 2.0,
  parameter real TQ_GAIN = 10.0
) (
  input  real              rpm,
  input  real              torque,
  input  real              i_amp,
  input  logic             glitch,
  output logic [7:0][15:0] vin,
  output logic             enc_a,
  output logic             enc_b
);
  localparam real PI = 3.14159265358979323846;
  int phase;

  function automatic logic [15:0] code(real volts);
    real c;
    c = volts * 32767.0 / 10.0;
    if (c > 32767.0) c = 32767.0;
    if (c < -32768.0) c = -32768.0;
    return 16'($rtoi(c < 0.0 ? c - 0.5 : c + 0.5));
  endfunction

  initial begin
    vin = '0;
    forever begin
      real t, th;
      t  = real'($time) * 1.0e-9;
      th = 2.0 * PI * 50.0 * t;
      for (int p = 0; p < 3; p++) begin
        vin[p]     = code(310.0 * $cos(th - 2.0 * PI * real'(p) / 3.0) / V_GAIN);
        vin[3 + p] = code(i_amp * $cos(th - PI / 6.0 - 2.0 * PI * real'(p) / 3.0) / I_GAIN);
      end
      vin[6] = code((torque + ($itor($urandom_range(1000)) / 1000.0 - 0.5)) / TQ_GAIN);
      vin[7] = '0;
      #200;
    end
  end

  initial begin
    phase = 0;
    enc_a = 0;
    enc_b = 0;
    forever begin
      if (rpm == 0.0) #100;
      else begin
        #(60.0e9 / ((rpm < 0.0 ? -rpm : rpm) * 20000.0));
        phase = (rpm > 0.0) ? (phase + 1) % 4 : (phase + 3) % 4;
        {enc_b, enc_a} = (phase == 0) ? 2'b00 : (phase == 1) ? 2'b01 : (phase == 2) ? 2'b11 : 2'b10;
      end
    end
  end

  always @(posedge glitch) begin
    phase = (phase + 2) % 4;
    {enc_b, enc_a} = ~{enc_b, enc_a};
  end
endmodule
