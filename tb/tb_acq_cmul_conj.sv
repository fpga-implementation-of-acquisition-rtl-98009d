// Testbench for acq_cmul_conj: A * conj(B), shifted right by SHIFT, for
// random operands. The reference forms the real and imaginary parts with
// 64-bit integers and divides by 2^SHIFT with floor rounding.
module tb_acq_cmul_conj;
  localparam int SHIFT = 15;
  int checks = 0, failures = 0;
  logic signed [27:0] ar, ai;
  logic signed [17:0] br, bi;
  logic signed [31:0] pr, pi;

  acq_cmul_conj #(.AW(28), .BW(18), .OW(32), .SHIFT(SHIFT)) dut (
    .a_re(ar), .a_im(ai), .b_re(br), .b_im(bi), .p_re(pr), .p_im(pi));

  function automatic longint floordiv(input longint v, input longint d);
    longint q;
    q = v / d;
    if ((v % d != 0) && (v < 0)) q = q - 1;
    return q;
  endfunction

  task automatic check_one(input longint a_r, input longint a_i, input longint b_r, input longint b_i);
    longint er, ei;
    ar = 28'(a_r); ai = 28'(a_i); br = 18'(b_r); bi = 18'(b_i);
    #1;
    er = floordiv(a_r * b_r + a_i * b_i, longint'(1) << SHIFT);
    ei = floordiv(a_i * b_r - a_r * b_i, longint'(1) << SHIFT);
    checks++;
    if (longint'(pr) != er || longint'(pi) != ei) begin
      failures++;
      $display("mismatch a=(%0d,%0d) b=(%0d,%0d) p=(%0d,%0d) expected (%0d,%0d)",
               a_r, a_i, b_r, b_i, pr, pi, er, ei);
    end
  endtask

  initial begin
    check_one(-(1 << 27), -(1 << 27), -(1 << 17), (1 << 17) - 1);
    check_one((1 << 27) - 1, 0, 0, 1);
    for (int k = 0; k < 1000; k++)
      check_one(longint'($signed(28'($urandom))), longint'($signed(28'($urandom))),
                longint'($signed(18'($urandom))), longint'($signed(18'($urandom))));
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
