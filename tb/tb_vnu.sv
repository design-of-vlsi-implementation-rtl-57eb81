// tb_vnu: self-checking testbench of the variable node unit.
// Random and extreme inputs; the expected extrinsic messages and the hard
// decision are computed with plain integers and saturation to +-31.
module tb_vnu;
  localparam int W = 6, DV = 3;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [W-1:0] ch;
  logic signed [W-1:0] c2v [DV];
  logic signed [W-1:0] v2c [DV];
  logic                dec;
  int checks = 0, failures = 0;

  vnu dut (.*);

  task automatic check_vec();
    int tot, x;
    #1;
    tot = int'(ch);
    for (int j = 0; j < DV; j++) tot += int'(c2v[j]);
    for (int j = 0; j < DV; j++) begin
      x = tot - int'(c2v[j]);
      if (x > 31) x = 31;
      if (x < -31) x = -31;
      checks++;
      if (int'(v2c[j]) != x) begin
        failures++;
        $display("FAIL v2c[%0d] got %0d expected %0d", j, v2c[j], x);
      end
    end
    checks++;
    if (dec !== (tot < 0)) begin
      failures++;
      $display("FAIL dec got %0d total %0d", dec, tot);
    end
  endtask

  initial begin
    ch = -32; for (int j = 0; j < DV; j++) c2v[j] = -32; check_vec();
    ch = 31;  for (int j = 0; j < DV; j++) c2v[j] = 31;  check_vec();
    ch = 0;   for (int j = 0; j < DV; j++) c2v[j] = 0;   check_vec();
    ch = 1; c2v[0] = -1; c2v[1] = 0; c2v[2] = 0; check_vec();
    for (int n = 0; n < 3000; n++) begin
      ch = W'($urandom);
      for (int j = 0; j < DV; j++) c2v[j] = W'($urandom);
      if (n % 2 == 0) begin
        ch = W'(int'($urandom_range(0, 12)) - 6);
        for (int j = 0; j < DV; j++) c2v[j] = W'(int'($urandom_range(0, 12)) - 6);
      end
      check_vec();
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
