// Testbench for acq_mag_memory: fills a small memory with random words,
// then reads every address back in random order, checking that the data
// appears exactly one clock after the address and that writes to one
// address do not disturb another.
module tb_acq_mag_memory;
  localparam int N = 256;
  int checks = 0, failures = 0;
  logic clk = 0, we;
  logic [7:0]  waddr, raddr;
  logic [63:0] wdata, rdata;
  logic [63:0] model [N];

  always #5 clk = ~clk;

  acq_mag_memory #(.N(N), .MAG_W(64)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    @(negedge clk);
    for (int a = 0; a < N; a++) begin
      we = 1; waddr = 8'(a); wdata = {$urandom, $urandom};
      model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int k = 0; k < 2 * N; k++) begin
      int a;
      a = int'($urandom_range(N - 1));
      raddr = 8'(a);
      // a concurrent write elsewhere must not disturb the read
      we = 1; waddr = 8'(a + 1); wdata = {$urandom, $urandom};
      @(posedge clk);
      model[(a + 1) % N] = wdata;
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("addr %0d read %h expected %h", a, rdata, model[a]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * N) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
