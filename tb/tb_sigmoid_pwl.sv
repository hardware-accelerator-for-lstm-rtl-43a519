// Self-checking testbench of sigmoid_pwl: sweeps x over [-10, 10] and compares
// with the exact sigmoid (tolerance 5e-4, the chord error plus rounding), and
// checks the saturation outside (-8, 8] and monotonic growth.
module tb_sigmoid_pwl;
  import bbs_pkg::*;

  int checks = 0, failures = 0;
  fx_t x, y, prev_y;
  real xr, err, max_err;

  sigmoid_pwl dut (.x(x), .y(y));

  initial begin
    max_err = 0.0;
    prev_y  = '0;
    for (int i = -10000; i <= 10000; i += 7) begin
      xr = i / 1000.0;
      x  = real_to_fx(xr);
      #1;
      err = fx_to_real(y) - sigmoid_real(fx_to_real(x));
      if (err < 0) err = -err;
      if (err > max_err) max_err = err;
      checks++;
      if (err > 5e-4) begin
        failures++;
        $display("x=%f y=%f exact=%f", xr, fx_to_real(y), sigmoid_real(xr));
      end
      checks++;
      if (y < prev_y - 2) begin failures++; $display("not monotonic at x=%f", xr); end
      prev_y = y;
    end
    x = real_to_fx(-8.0); #1; checks++; if (y != 0)      begin failures++; $display("sat low");  end
    x = real_to_fx(8.5);  #1; checks++; if (y != FX_ONE) begin failures++; $display("sat high"); end
    $display("max error %f", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
