// Testbench for acq_mixer: random signal and carrier samples, plus the
// extreme values; I and Q are compared with products formed in integer
// arithmetic in the testbench.
module tb_acq_mixer;
  int checks = 0, failures = 0;
  logic signed [3:0]  sig;
  logic signed [7:0]  s, c;
  logic signed [11:0] i_out, q_out;

  acq_mixer #(.SIG_W(4), .CAR_W(8)) dut (.sig_in(sig), .sin_in(s), .cos_in(c), .i_out, .q_out);

  task automatic check_one(input int a, input int b, input int d);
    sig = 4'(a); s = 8'(b); c = 8'(d);
    #1;
    checks++;
    if (int'(i_out) != a * b || int'(q_out) != a * d) begin
      failures++;
      $display("mismatch sig=%0d sin=%0d cos=%0d -> I=%0d Q=%0d", a, b, d, i_out, q_out);
    end
  endtask

  initial begin
    check_one(-8, -128, 127);
    check_one(7, 127, -128);
    check_one(-8, -128, -128);
    for (int k = 0; k < 500; k++)
      check_one(int'($urandom_range(15)) - 8, int'($urandom_range(255)) - 128, int'($urandom_range(255)) - 128);
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
