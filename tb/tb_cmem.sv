// tb_cmem: self-checking testbench of the channel-message memory.
// Writes P signed values in order (the load phase), then reads them back in
// order several times with writes disabled (variable node phases).
module tb_cmem;
  localparam int DEPTH = 64, W = 6;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [$clog2(DEPTH)-1:0] addr;
  logic                     we;
  logic signed [W-1:0]      wdata, rdata;
  logic signed [W-1:0]      shadow [DEPTH];
  int checks = 0, failures = 0;

  cmem dut (.*);

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int frame = 0; frame < 3; frame++) begin
      @(negedge clk);
      for (int a = 0; a < DEPTH; a++) begin
        addr = a[5:0]; we = 1; wdata = W'($urandom);
        shadow[a] = wdata;
        @(negedge clk);
      end
      we = 0;
      for (int pass = 0; pass < 3; pass++)
        for (int a = 0; a < DEPTH; a++) begin
          addr = a[5:0]; wdata = W'($urandom);
          #1;
          checks++;
          if (rdata !== shadow[a]) begin
            failures++;
            $display("FAIL addr %0d got %0d expected %0d", a, rdata, shadow[a]);
          end
          @(negedge clk);
        end
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
