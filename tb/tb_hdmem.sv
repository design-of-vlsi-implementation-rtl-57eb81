// tb_hdmem: self-checking testbench of the hard-decision memory.
// Random writes and reads at independent addresses in the same cycles,
// checked against a shadow bit vector (reads see the value before the edge).
module tb_hdmem;
  localparam int DEPTH = 64;
  logic clk = 0;
  always #5 clk = ~clk;

  logic                     we, wbit, rbit;
  logic [$clog2(DEPTH)-1:0] waddr, raddr;
  logic [DEPTH-1:0]         shadow;
  int checks = 0, failures = 0;

  hdmem dut (.*);

  initial begin
    we = 0; wbit = 0; waddr = 0; raddr = 0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      we = 1; waddr = a[5:0]; wbit = 1'($urandom); shadow[a] = wbit;
      @(negedge clk);
    end
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom); waddr = 6'($urandom); wbit = 1'($urandom);
      raddr = 6'($urandom);
      #1;
      checks++;
      if (rbit !== shadow[raddr]) begin
        failures++;
        $display("FAIL raddr %0d got %0d expected %0d", raddr, rbit, shadow[raddr]);
      end
      if (we) shadow[waddr] = wbit;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
