// tb_pga_control: a behavioural PGA/ADC loop (sample = gain code times a
// fixed-amplitude tone, clipped to 8 bits) must settle the mean |x| inside
// the target band; the gain changes only at window ends, one step at a time.
module tb_pga_control;
  localparam int WIN = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic signed [7:0] x;
  logic x_valid, step;
  logic [5:0] gain;
  int checks = 0, failures = 0;

  pga_control #(.WIN(WIN), .TARGET(32), .HYST(4)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int n, prev_gain, ups, downs, sumabs;
    real amp;
    x = 0; x_valid = 0; n = 0; ups = 0; downs = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check(gain == 6'd32, "gain leaves reset at mid-range");
    for (int phase = 0; phase < 2; phase++) begin
      amp = (phase == 0) ? 0.9 : 2.5;    // weak line, then strong line
      for (int w = 0; w < 120; w++) begin
        sumabs = 0;
        for (int i = 0; i < WIN; i++) begin
          int v;
          @(negedge clk);
          v = int'(amp * real'(gain) * $sin(real'(n) * 0.7));
          if (v > 127) v = 127;
          if (v < -128) v = -128;
          x = 8'(v); x_valid = 1; n++;
          sumabs += (v < 0) ? -v : v;
          prev_gain = int'(gain);
          @(posedge clk); #1;
          if (i != WIN - 1) check(int'(gain) == prev_gain, "gain steady inside a window");
          else begin
            check(int'(gain) - prev_gain <= 1 && prev_gain - int'(gain) <= 1, "one step per window");
            if (int'(gain) > prev_gain) ups++;
            if (int'(gain) < prev_gain) downs++;
          end
        end
      end
      check(sumabs >= (32 - 4 - 2) * WIN && sumabs <= (32 + 4 + 2) * WIN,
            $sformatf("settled mean |x| = %0d", sumabs / WIN));
    end
    check(ups > 0, "gain raised for a weak signal");
    check(downs > 0, "gain lowered for a strong signal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
