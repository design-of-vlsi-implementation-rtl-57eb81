// tb_dmem: self-checking testbench of the decoding-message memory.
// Fills every word, then does read-modify-write passes (read at an address,
// write a new value there in the same cycle) as the decoder does, comparing
// the combinational read data with a shadow array every cycle.
module tb_dmem;
  localparam int DEPTH = 64, WIDTH = 7;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [$clog2(DEPTH)-1:0] addr;
  logic                     we;
  logic [WIDTH-1:0]         wdata, rdata;
  logic [WIDTH-1:0]         shadow [DEPTH];
  int checks = 0, failures = 0;

  dmem dut (.*);

  initial begin
    we = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      addr = a[5:0]; we = 1; wdata = WIDTH'($urandom);
      shadow[a] = wdata;
      @(negedge clk);
    end
    for (int pass = 0; pass < 8; pass++) begin
      int k;
      k = $urandom_range(0, DEPTH - 1);
      for (int i = 0; i < DEPTH; i++) begin
        addr = 6'((k + i) % DEPTH);
        we = (pass % 3 != 2);
        #1;
        checks++;
        if (rdata !== shadow[addr]) begin
          failures++;
          $display("FAIL addr %0d got %h expected %h", addr, rdata, shadow[addr]);
        end
        wdata = rdata ^ WIDTH'($urandom);
        if (we) shadow[addr] = wdata;
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
