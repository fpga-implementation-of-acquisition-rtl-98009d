// Testbench for acq_magnitude: |u|^2 = R^2 + I^2 for random and extreme
// 32-bit inputs, checked against a reference built from the unsigned
// magnitudes of R and I.
module tb_acq_magnitude;
  int checks = 0, failures = 0;
  logic signed [31:0] re, im;
  logic [63:0]        mag;

  acq_magnitude #(.W(32)) dut (.re, .im, .mag);

  task automatic check_one(input logic signed [31:0] a, input logic signed [31:0] b);
    logic [63:0] ua, ub, expv;
    re = a; im = b;
    #1;
    ua = (a < 0) ? 64'(-64'(a)) : 64'(a);
    ub = (b < 0) ? 64'(-64'(b)) : 64'(b);
    expv = ua * ua + ub * ub;
    checks++;
    if (mag !== expv) begin
      failures++;
      $display("mismatch re=%0d im=%0d mag=%0d expected %0d", a, b, mag, expv);
    end
  endtask

  initial begin
    check_one(32'sh8000_0000, 32'sh8000_0000);
    check_one(32'sh7fff_ffff, -32'sd5);
    check_one(0, 0);
    for (int k = 0; k < 500; k++) begin
      logic signed [31:0] a, b;
      a = $urandom; b = $urandom;
      if (k % 2 == 0) begin a = a >>> 12; b = b >>> 12; end
      check_one(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
