// Testbench for acq_prn_gen. The reference C/A code is built a second way:
// the G2 sequence is delayed by the satellite's published code delay (in
// chips) instead of using phase-selector taps. For every satellite the
// 2048 upsampled samples of one code period are compared with chip
// floor(k * 1023 / 2048) of the reference. The first ten chips of
// satellites 1..10 are also checked against their published octal values,
// and a restart in the middle of a code must rewind to chip 0.
module tb_acq_prn_gen;
  localparam int N = 2048;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, restart = 0, advance = 0;
  logic [5:0] sat_id = 6'd1;
  logic chip_bit;
  always #5 clk = ~clk;

  acq_prn_gen #(.N(N)) dut (.clk, .rst_n, .restart, .sat_id, .advance, .chip_bit);

  int delay_tab [32] = '{5, 6, 7, 8, 17, 18, 139, 140, 141, 251, 252, 254, 255, 256, 257, 258,
                         469, 470, 471, 472, 473, 474, 509, 512, 513, 514, 515, 516, 859, 860, 861, 862};
  int octal_first10 [10] = '{'o1440, 'o1620, 'o1710, 'o1744, 'o1133, 'o1455, 'o1131, 'o1454, 'o1626, 'o1504};

  bit g1seq [1023], g2seq [1023], ca [1023];

  function automatic void build_ref(input int sat);
    bit [10:1] r1, r2;
    r1 = '1; r2 = '1;
    for (int k = 0; k < 1023; k++) begin
      g1seq[k] = r1[10];
      g2seq[k] = r2[10];
      r1 = {r1[9:1], r1[3] ^ r1[10]};
      r2 = {r2[9:1], r2[2] ^ r2[3] ^ r2[6] ^ r2[8] ^ r2[9] ^ r2[10]};
    end
    for (int k = 0; k < 1023; k++)
      ca[k] = g1seq[k] ^ g2seq[(k - delay_tab[sat - 1] + 1023) % 1023];
  endfunction

  task automatic do_restart(input int sat);
    @(negedge clk);
    sat_id = 6'(sat); restart = 1; advance = 0;
    @(negedge clk);
    restart = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int sat = 1; sat <= 32; sat++) begin
      int first10;
      build_ref(sat);
      first10 = 0;
      for (int k = 0; k < 10; k++) first10 = (first10 << 1) | int'(ca[k]);
      if (sat <= 10) begin
        checks++;
        if (first10 != octal_first10[sat - 1]) begin
          failures++; $display("reference of satellite %0d starts %o", sat, first10);
        end
      end
      do_restart(sat);
      for (int k = 0; k < N; k++) begin
        checks++;
        if (chip_bit !== ca[(k * 1023) / N]) begin
          failures++;
          if (failures < 10) $display("sat %0d sample %0d: got %0b expected %0b", sat, k, chip_bit, ca[(k * 1023) / N]);
        end
        advance = 1;
        @(negedge clk);
        advance = 0;
      end
    end
    // restart in the middle of a code
    build_ref(7);
    do_restart(7);
    advance = 1;
    repeat (333) @(negedge clk);
    advance = 0;
    do_restart(7);
    checks++;
    if (chip_bit !== ca[0]) begin failures++; $display("restart did not rewind"); end
    // holding advance low must freeze the code
    advance = 1; repeat (100) @(negedge clk); advance = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (chip_bit !== ca[(100 * 1023) / N]) begin failures++; $display("code moved without advance"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
