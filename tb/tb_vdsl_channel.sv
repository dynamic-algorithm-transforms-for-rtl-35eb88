// tb_vdsl_channel: behavioural model of what lies between the transmitter's
// digital output and the receiver's ADC output: DAC, twisted-pair channel
// (a delay and one echo), additive Gaussian noise, the PGA (gain code / 32)
// and an 8-bit ADC with clipping. Not synthesizable; testbench use only.
// noise_rms is in ADC LSBs at unity PGA gain and can be changed at run time.
// The noise comes from the model's own xorshift generator, started from the
// parameter SEED, so a run does not depend on the simulator's seed.
module tb_vdsl_channel #(
  parameter int  TXW   = 20,
  parameter int  DELAY = 0,       // flat delay in samples
  parameter int  ECHO_DLY = 5,    // echo delay in samples
  parameter real ECHO  = 0.15,    // echo amplitude
  parameter real SCALE = 1.0 / 128.0,
  parameter int unsigned SEED = 32'h2545f491
) (
  input  logic                   clk,
  input  logic                   valid,
  input  logic signed [TXW-1:0]  tx,
  input  logic [5:0]             gain,
  input  real                    noise_rms,
  output logic signed [7:0]      adc
);

  localparam int DEPTH = DELAY + ECHO_DLY + 1;
  real line [DEPTH];

  int unsigned rng = SEED;

  function automatic int unsigned next_rand();
    rng ^= rng << 13;
    rng ^= rng >> 17;
    rng ^= rng << 5;
    return rng;
  endfunction

  // sum of 12 uniform values on [0, 1): mean 6, variance 1
  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'(next_rand() % 1000001) / 1000000.0;
    return s - 6.0;
  endfunction

  initial begin
    foreach (line[i]) line[i] = 0.0;
    adc = 0;
  end

  always @(posedge clk) begin
    if (valid) begin
      real v;
      int q;
      for (int i = DEPTH - 1; i > 0; i--) line[i] = line[i-1];
      line[0] = real'(tx);
      v = (line[DELAY] + ECHO * line[DELAY + ECHO_DLY]) * SCALE;
      v = (v + noise_rms * gauss()) * real'(gain) / 32.0;
      q = (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(-v + 0.5);
      if (q > 127) q = 127;
      if (q < -128) q = -128;
      adc <= 8'(q);
    end
  end

endmodule
