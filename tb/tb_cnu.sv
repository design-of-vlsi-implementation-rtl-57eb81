// tb_cnu: self-checking testbench of the min-sum check node unit.
// Drives random and corner-case message vectors (including the most negative
// code -2^(W-1) and ties between magnitudes) and compares every output with
// a brute-force model: for each edge, the sign product and the minimum
// magnitude over the other DC-1 inputs. Also checks the syndrome bit.
module tb_cnu;
  localparam int W = 6, DC = 6;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [W-1:0] v2c [DC];
  logic                dec [DC];
  logic signed [W-1:0] c2v [DC];
  logic                syn;
  int checks = 0, failures = 0;

  cnu dut (.*);

  function automatic int mag_of(int x);
    int m;
    m = (x < 0) ? -x : x;
    return (m > 31) ? 31 : m;
  endfunction

  task automatic check_vec();
    int exp_m, exp_s, par;
    #1;
    par = 0;
    for (int i = 0; i < DC; i++) begin
      exp_m = 31; exp_s = 0;
      for (int k = 0; k < DC; k++) if (k != i) begin
        if (mag_of(int'(v2c[k])) < exp_m) exp_m = mag_of(int'(v2c[k]));
        if (v2c[k] < 0) exp_s ^= 1;
      end
      checks++;
      if (int'(c2v[i]) != (exp_s ? -exp_m : exp_m)) begin
        failures++;
        $display("FAIL edge %0d: got %0d expected %0d", i, c2v[i], exp_s ? -exp_m : exp_m);
      end
      par ^= int'(dec[i]);
    end
    checks++;
    if (syn !== par[0]) begin
      failures++;
      $display("FAIL syndrome: got %0d expected %0d", syn, par);
    end
  endtask

  initial begin
    // corner: all equal magnitudes, all most negative
    for (int i = 0; i < DC; i++) begin v2c[i] = -32; dec[i] = 1'b1; end
    check_vec();
    for (int i = 0; i < DC; i++) begin v2c[i] = (i % 2) ? 7 : -7; dec[i] = i[0]; end
    check_vec();
    for (int i = 0; i < DC; i++) begin v2c[i] = 0; dec[i] = 1'b0; end
    check_vec();
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < DC; i++) begin
        v2c[i] = W'($urandom);
        if (n % 3 == 0) v2c[i] = W'(int'($urandom_range(0, 8)) - 4);
        dec[i] = 1'(($urandom));
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
