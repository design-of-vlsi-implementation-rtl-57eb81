// tb_ldpc_c2: end-to-end testbench of the decoder configured for the longer
// code: P = 64, 64 x 128 base matrix, length 8192, 20 iterations. Same
// frames and checks as tb_ldpc_decoder (the default, length-4096 code).
//
// A bit-true reference decoder written over the expanded parity-check matrix
// (check node u*P + r meets variable node v*P + ((r + k) mod P) for every base
// 1 at (u,v) with shift k) runs flooding min-sum with the same 6-bit
// saturation, the same syndrome test before every iteration and the same
// iteration limit. For each frame the testbench compares every decoded bit,
// the iteration count, the converged flag and the latency from the last input
// beat to the first output beat, P * (2*iterations + 1) when converged and
// 2 * P * MAX_ITER otherwise.
//
// Frames: a clean all-zero codeword (stops before the first iteration), noisy
// all-zero codewords (stop after some iterations), random channel values that
// never satisfy the checks (stop at the iteration limit), a noisy non-zero
// codeword obtained by Gauss-Jordan elimination of H (the decision must equal
// it) and an all-zero codeword with a few strong errors. in_valid and out_ready
// stall at random. Each mechanism (early stop, iterative convergence,
// iteration limit, input stall, output stall) is counted and must occur.
module tb_ldpc_c2;
  import ldpc_pkg::*;
  localparam int P = 64, MS = 64, NS = 128, DV = 3, DC = 6, W = 6, MAX_ITER = 20;
  localparam int N = P * NS, M = P * MS, L = NS * DV, E = L * P;
  localparam int HI = (1 << (W - 1)) - 1;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, in_ready, out_valid, out_ready, out_converged;
  logic signed [W-1:0] in_llr [NS];
  logic [NS-1:0] out_dec;
  logic [4:0] out_iter;

  ldpc_decoder #(.MS(MS), .NS(NS)) dut (.*);

  int checks = 0, failures = 0;
  int n_early = 0, n_iter_conv = 0, n_limit = 0, n_in_stall = 0, n_out_stall = 0;

  // ---------------- reference decoder ----------------
  int llr [N];
  int e_row [L], e_col [L], e_k [L];
  int msg [E];         // message on expanded edge e*P + r
  bit ref_dec [N];
  int ref_iter;
  bit ref_conv;

  function automatic int sat(int x);
    return (x > HI) ? HI : (x < -HI) ? -HI : x;
  endfunction

  function automatic int var_of(int ee);
    int e, r;
    e = ee / P; r = ee % P;
    return e_col[e] * P + (r + e_k[e]) % P;
  endfunction

  function automatic bit syndrome_ok();
    bit s [M];
    foreach (s[c]) s[c] = 0;
    for (int ee = 0; ee < E; ee++)
      s[e_row[ee / P] * P + ee % P] ^= ref_dec[var_of(ee)];
    foreach (s[c]) if (s[c]) return 0;
    return 1;
  endfunction

  task automatic ref_decode();
    int  tot [N];
    int  m1 [M], m2 [M], pos [M];
    bit  sg [M];
    for (int n = 0; n < N; n++) ref_dec[n] = (llr[n] < 0);
    for (int ee = 0; ee < E; ee++) msg[ee] = llr[var_of(ee)];
    ref_iter = 0; ref_conv = 0;
    forever begin
      if (syndrome_ok()) begin ref_conv = 1; return; end
      // check nodes: min-sum over all edges of each check
      for (int c = 0; c < M; c++) begin m1[c] = HI; m2[c] = HI; pos[c] = -1; sg[c] = 0; end
      for (int ee = 0; ee < E; ee++) begin
        int c, a;
        c = e_row[ee / P] * P + ee % P;
        a = (msg[ee] < -HI) ? HI : (msg[ee] < 0 ? -msg[ee] : msg[ee]);
        sg[c] ^= (msg[ee] < 0);
        if (a < m1[c]) begin m2[c] = m1[c]; m1[c] = a; pos[c] = ee; end
        else if (a < m2[c]) m2[c] = a;
      end
      for (int ee = 0; ee < E; ee++) begin
        int c, a, s;
        c = e_row[ee / P] * P + ee % P;
        a = (pos[c] == ee) ? m2[c] : m1[c];
        s = sg[c] ^ (msg[ee] < 0);
        msg[ee] = s ? -a : a;
      end
      // variable nodes
      for (int n = 0; n < N; n++) tot[n] = llr[n];
      for (int ee = 0; ee < E; ee++) tot[var_of(ee)] += msg[ee];
      for (int ee = 0; ee < E; ee++) msg[ee] = sat(tot[var_of(ee)] - msg[ee]);
      for (int n = 0; n < N; n++) ref_dec[n] = (tot[n] < 0);
      ref_iter++;
      if (ref_iter == MAX_ITER) return;
    end
  endtask

  // ---------------- a non-zero codeword ----------------
  // Gauss-Jordan elimination of H over GF(2); the non-pivot bits are chosen
  // at random and each pivot bit is the parity of its reduced row over them.
  logic [N-1:0] hrow [M];
  bit           cw [N];

  task automatic make_codeword();
    int rank, piv_col [M];
    logic [N-1:0] x, tmp;
    foreach (hrow[c]) hrow[c] = '0;
    for (int ee = 0; ee < E; ee++) hrow[e_row[ee / P] * P + ee % P][var_of(ee)] = 1'b1;
    rank = 0;
    for (int col = 0; col < N && rank < M; col++) begin
      int pr;
      pr = -1;
      for (int r = rank; r < M; r++) if (hrow[r][col]) begin pr = r; break; end
      if (pr < 0) continue;
      tmp = hrow[pr]; hrow[pr] = hrow[rank]; hrow[rank] = tmp;
      for (int r = 0; r < M; r++)
        if (r != rank && hrow[r][col]) hrow[r] ^= hrow[rank];
      piv_col[rank] = col;
      rank++;
    end
    x = '0;
    for (int n = 0; n < N; n++) x[n] = 1'($urandom);
    for (int r = 0; r < rank; r++) x[piv_col[r]] = 1'b0;
    for (int r = 0; r < rank; r++) x[piv_col[r]] = ^(hrow[r] & x);
    for (int n = 0; n < N; n++) cw[n] = x[n];
    $display("H has rank %0d; codeword weight %0d", rank, $countones(x));
  endtask

  // ---------------- stimulus ----------------
  function automatic int gauss(int mean, int sigma10);
    // sum of four uniforms in [-1000,1000] approximates N(0, 1155^2);
    // sigma10 is ten times the wanted deviation
    int s;
    s = 0;
    for (int i = 0; i < 4; i++) s += int'($urandom_range(0, 2000)) - 1000;
    return mean + (s * sigma10) / 11550;
  endfunction

  task automatic run_frame(string name, int stall_pct);
    int beat, cyc, lat, t0, obeat;
    bit got [N];
    ref_decode();
    // load
    beat = 0;
    while (beat < P) begin
      in_valid = ($urandom_range(0, 99) >= stall_pct);
      for (int v = 0; v < NS; v++) in_llr[v] = W'(llr[v * P + beat]);
      @(posedge clk);
      if (!in_valid) n_in_stall++;
      if (in_valid && in_ready) beat++;
      #1;
    end
    in_valid = 0;
    t0 = $time;
    cyc = 0;
    while (!out_valid) begin
      @(posedge clk); #1; cyc++;
      if (cyc > 2 * P * (MAX_ITER + 2)) break;
    end
    lat = cyc;
    obeat = 0;
    while (obeat < P && out_valid) begin
      out_ready = ($urandom_range(0, 99) >= stall_pct);
      #1;
      if (out_ready) begin
        for (int v = 0; v < NS; v++) got[v * P + obeat] = out_dec[v];
        if (obeat == 0) begin
          checks += 2;
          if (int'(out_iter) != ref_iter || out_converged != ref_conv) begin
            failures++;
            $display("FAIL %s: iter %0d conv %0d, expected iter %0d conv %0d",
                     name, out_iter, out_converged, ref_iter, ref_conv);
          end
        end
        obeat++;
      end else n_out_stall++;
      @(posedge clk); #1;
    end
    out_ready = 0;
    begin
      int bad, errs;
      bad = 0; errs = 0;
      for (int n = 0; n < N; n++) begin
        if (got[n] != ref_dec[n]) bad++;
        if (ref_dec[n]) errs++;
      end
      checks++;
      if (obeat != P || bad != 0) begin
        failures++;
        $display("FAIL %s: %0d output beats, %0d bits differ from reference", name, obeat, bad);
      end
      checks++;
      if (lat != (ref_conv ? P * (2 * ref_iter + 1) : 2 * P * MAX_ITER)) begin
        failures++;
        $display("FAIL %s: latency %0d cycles", name, lat);
      end
      $display("%s: iterations %0d converged %0d latency %0d cycles, ones in decision %0d",
               name, ref_iter, ref_conv, lat, errs);
    end
    if (ref_conv && ref_iter == 0) n_early++;
    if (ref_conv && ref_iter > 0)  n_iter_conv++;
    if (!ref_conv)                 n_limit++;
  endtask

  initial begin
    for (int e = 0; e < L; e++) begin
      e_col[e] = e / DV;
      e_row[e] = base_row(e / DV, e % DV, MS);
      e_k[e]   = edge_shift(e, P);
    end
    rst_n = 0; in_valid = 0; out_ready = 0;
    foreach (in_llr[v]) in_llr[v] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // 1: clean all-zero codeword
    for (int n = 0; n < N; n++) llr[n] = 12;
    run_frame("clean zero codeword", 0);
    // 2-4: noisy all-zero codewords
    for (int f = 0; f < 3; f++) begin
      for (int n = 0; n < N; n++) llr[n] = sat(gauss(5, 30 + 5 * f));
      run_frame($sformatf("noisy zero codeword %0d", f), 20);
    end
    // 5: random channel values (no codeword)
    for (int n = 0; n < N; n++) llr[n] = sat(int'($urandom_range(0, 2 * HI)) - HI);
    run_frame("random values", 30);
    // 6: noisy non-zero codeword; the decision must equal the codeword
    make_codeword();
    for (int n = 0; n < N; n++) llr[n] = sat(cw[n] ? -gauss(5, 30) : gauss(5, 30));
    run_frame("noisy non-zero codeword", 10);
    begin
      int diff;
      diff = 0;
      for (int n = 0; n < N; n++) if (ref_dec[n] != cw[n]) diff++;
      checks++;
      if (!ref_conv || diff != 0) begin
        failures++;
        $display("FAIL non-zero codeword not recovered: %0d bits differ", diff);
      end
    end
    // 7: a few strong errors on the all-zero codeword
    for (int n = 0; n < N; n++) llr[n] = 9;
    for (int i = 0; i < 12; i++) llr[$urandom_range(0, N - 1)] = -9;
    run_frame("twelve flipped bits", 0);

    checks += 5;
    if (n_early == 0)     begin failures++; $display("FAIL no stop before first iteration"); end
    if (n_iter_conv == 0) begin failures++; $display("FAIL no convergence after iterating"); end
    if (n_limit == 0)     begin failures++; $display("FAIL iteration limit never reached"); end
    if (n_in_stall == 0)  begin failures++; $display("FAIL no input stall"); end
    if (n_out_stall == 0) begin failures++; $display("FAIL no output stall"); end
    $display("mechanisms: early stop %0d, converged after iterating %0d, limit %0d, input stalls %0d, output stalls %0d",
             n_early, n_iter_conv, n_limit, n_in_stall, n_out_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
