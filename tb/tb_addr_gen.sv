// tb_addr_gen: self-checking testbench of the DMEM address counter.
// Runs check phases (restart at K) and variable phases (restart at 0) of P
// cycles, with stalls, and checks that the t-th address of a check phase is
// (K + t) mod P and of a variable phase t. Two instances, K = 0 and K = 45.
module tb_addr_gen;
  localparam int P = 64;
  localparam int K1 = 45;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, load, load_k, en;
  logic [5:0] a0, a1;
  int checks = 0, failures = 0;

  addr_gen #(.P(P), .K(0))  dut0 (.clk, .rst_n, .load, .load_k, .en, .addr(a0));
  addr_gen #(.P(P), .K(K1)) dut1 (.clk, .rst_n, .load, .load_k, .en, .addr(a1));

  task automatic run_phase(bit chk, bit next_chk, bit stalls);
    int t;
    t = 0;
    while (t < P) begin
      en = stalls ? 1'($urandom) : 1'b1;
      #1;
      checks += 2;
      if (int'(a1) != (chk ? (K1 + t) % P : t)) begin
        failures++;
        $display("FAIL K=%0d phase chk=%0d t=%0d addr %0d", K1, chk, t, a1);
      end
      if (int'(a0) != t) begin
        failures++;
        $display("FAIL K=0 t=%0d addr %0d", t, a0);
      end
      load   = en && (t == P - 1);
      load_k = next_chk;
      @(negedge clk);
      if (en) t++;
      load = 0;
    end
  endtask

  initial begin
    rst_n = 0; load = 0; load_k = 0; en = 0;
    @(negedge clk);
    rst_n = 1;
    run_phase(0, 1, 1);   // load phase starts from reset value 0
    for (int it = 0; it < 4; it++) begin
      run_phase(1, 0, it == 2);
      run_phase(0, 1, it == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
