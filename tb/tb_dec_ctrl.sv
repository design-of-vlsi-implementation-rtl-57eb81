// tb_dec_ctrl: self-checking testbench of the decoder controller.
// P = 8, MAX_ITER = 5. For each frame the testbench decides in which CHECK
// phase the syndrome first becomes zero (or never), raises syn_any in one
// random cycle of every earlier CHECK phase (so the controller must
// accumulate it over the phase), stalls in_valid and out_ready at random,
// and checks: the phase counter runs 0..P-1 per phase, the counter restart
// comes in the last cycle with restart-at-K exactly before CHECK, the number
// of CHECK and VAR cycles, the iteration count and the converged flag.
module tb_dec_ctrl;
  import ldpc_pkg::*;
  localparam int P = 8, MAX_ITER = 5;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, in_ready, out_valid, out_ready, syn_any;
  mode_e mode;
  logic [2:0] t;
  logic mem_we, ag_en, ag_load, ag_load_k;
  logic [2:0] iter;
  logic converged;
  int checks = 0, failures = 0;

  dec_ctrl #(.P(P), .MAX_ITER(MAX_ITER), .EARLY_STOP(1'b1)) dut (.*);

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // conv_at: index of the CHECK phase with zero syndrome, -1 for never
  task automatic run_frame(int conv_at);
    int nchk, nvar, tc, pulse, beats, exp_iter;
    mode_e prev;
    nchk = 0; nvar = 0; beats = 0;
    // load phase
    while (beats < P) begin
      in_valid = 1'($urandom);
      #1;
      expect_eq("in_ready in LOAD", int'(in_ready), 1);
      if (in_valid) begin
        expect_eq("t in LOAD", int'(t), beats);
        expect_eq("restart at end of LOAD", int'(ag_load), int'(beats == P - 1));
        if (beats == P - 1) expect_eq("restart at K before CHECK", int'(ag_load_k), 1);
        beats++;
      end else expect_eq("no write when idle", int'(mem_we), 0);
      @(negedge clk);
    end
    in_valid = 0;
    // iterate
    while (mode != MODE_OUT) begin
      prev = mode;
      pulse = $urandom_range(0, P - 1);
      for (tc = 0; tc < P; tc++) begin
        syn_any = (mode == MODE_CHECK) && (conv_at < 0 || nchk < conv_at) && (tc == pulse);
        #1;
        expect_eq("t", int'(t), tc);
        expect_eq("mode held in phase", int'(mode), int'(prev));
        expect_eq("write strobe", int'(mem_we), 1);
        expect_eq("restart only in last cycle", int'(ag_load), int'(tc == P - 1));
        if (tc == P - 1) begin
          // next mode is CHECK iff this is VAR and the limit is not reached
          expect_eq("restart value", int'(ag_load_k),
                    int'(mode == MODE_VAR && nvar + 1 < MAX_ITER));
        end
        @(negedge clk);
      end
      syn_any = 0;
      if (prev == MODE_CHECK) nchk++; else nvar++;
      if (nchk + nvar > 3 * MAX_ITER) break;
    end
    exp_iter = (conv_at < 0 || conv_at >= MAX_ITER) ? MAX_ITER : conv_at;
    expect_eq("VAR phases", nvar, exp_iter);
    expect_eq("CHECK phases", nchk, (conv_at < 0 || conv_at >= MAX_ITER) ? MAX_ITER :
                                      conv_at + 1);
    // output phase
    beats = 0;
    while (beats < P) begin
      out_ready = 1'($urandom);
      #1;
      expect_eq("out_valid", int'(out_valid), 1);
      expect_eq("iter", int'(iter), exp_iter);
      expect_eq("converged", int'(converged), int'(conv_at >= 0 && conv_at < MAX_ITER));
      expect_eq("no write in OUT", int'(mem_we), 0);
      if (out_ready) begin
        expect_eq("t in OUT", int'(t), beats);
        beats++;
      end
      @(negedge clk);
    end
    out_ready = 0;
    #1 expect_eq("back to LOAD", int'(mode), int'(MODE_LOAD));
  endtask

  initial begin
    rst_n = 0; in_valid = 0; out_ready = 0; syn_any = 0;
    @(negedge clk);
    rst_n = 1;
    run_frame(0);
    run_frame(2);
    run_frame(-1);
    run_frame(4);
    run_frame(1);
    run_frame(-1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
