// pga_control: digital control of the receiver's programmable gain amplifier.
//
// Closes an automatic gain loop around the PGA and the ADC: the mean of |x|
// over WIN valid ADC samples is compared with TARGET; if it is below
// TARGET-HYST the gain code is raised by one step, if above TARGET+HYST it is
// lowered by one step (saturating at 0 and 2**GW-1). The gain code leaves
// reset at mid-range. Timing: gain changes on the clock edge after the
// WIN-th sample of a window; step pulses then for one cycle.
// The document says only that a digital block sets the PGA gain from the
// ADC output; the measure, the window, the target and the one-step law are
// this design's choices.
module pga_control
  import dat_pkg::*;
#(
  parameter int WIN    = 1024,
  parameter int GW     = 6,
  parameter int TARGET = 32,   // mean |x| aimed at, in ADC LSBs
  parameter int HYST   = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [FF_BX-1:0] x,
  input  logic                    x_valid,
  output logic [GW-1:0]           gain,
  output logic                    step
);

  localparam int AW = FF_BX + $clog2(WIN);
  localparam logic [AW-1:0] LOW  = AW'((TARGET - HYST) * WIN);
  localparam logic [AW-1:0] HIGH = AW'((TARGET + HYST) * WIN);

  logic [AW-1:0]          acc, nxt;
  logic [$clog2(WIN)-1:0] cnt;
  logic [FF_BX-1:0]       mag;

  assign mag = x[FF_BX-1] ? FF_BX'(-x) : FF_BX'(x);
  assign nxt = acc + AW'(mag);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      cnt  <= '0;
      gain <= GW'(2 ** (GW - 1));
      step <= 1'b0;
    end else begin
      step <= 1'b0;
      if (x_valid) begin
        if (cnt == $clog2(WIN)'(WIN - 1)) begin
          cnt <= '0;
          acc <= '0;
          if (nxt < LOW && gain != '1) begin
            gain <= gain + 1'b1;
            step <= 1'b1;
          end else if (nxt > HIGH && gain != '0) begin
            gain <= gain - 1'b1;
            step <= 1'b1;
          end
        end else begin
          cnt <= cnt + 1'b1;
          acc <= nxt;
        end
      end
    end
  end

endmodule
