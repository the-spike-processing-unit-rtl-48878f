// tb_spu_patterns: the temporal pattern discrimination task on one SPU.
//
// Two deterministic four-synapse patterns are the target classes:
//   pattern A: synapses 0 and 1 at step 1, synapse 2 at step 3;
//   pattern B: synapse 3 at step 0, synapses 2 and 0 at step 5.
// Noise patterns hold four spikes at random steps 0..5 on random synapses.
// Each pattern is followed by a settling window of 8 samples after its last
// input. The goal for a parameter set is: exactly one output spike for A,
// exactly one for B at a different time, and none for any of five noise
// patterns.
//
// The weights, threshold and coefficients of a trained neuron are not part of
// this design, so the testbench first finds such a parameter set itself with
// a small hill-climbing search over the ten 6-bit parameters, scored by the
// integer reference model (spu_ref_pkg). It then loads the set into the SPU
// through its configuration port, applies every pattern from reset, and
// checks that the hardware gives the same spike count, the same first-spike
// time and the same membrane trace as the model, and that A and B are
// separated and the noise is silent. Five fresh noise patterns, not seen by
// the search, are also applied; their spikes are reported and compared with
// the model but not required to be zero.
module tb_spu_patterns;
  import spu_pkg::*;
  import spu_ref_pkg::*;

  localparam int N_SYN  = 4;
  localparam int ADDR_W = $clog2(N_SYN + 7);
  localparam int N_PAR  = N_SYN + 6;   // w0..w3, Vth, b0, b1, b2, a1, a2
  localparam int N_PAT  = 12;          // A, B, 5 training noise, 5 fresh noise
  localparam int SETTLE = 8;
  localparam int MAXLEN = 16;

  logic              clk = 0, rst, cfg_rst, cfg_we;
  logic [N_SYN-1:0]  syn_in;
  logic [ADDR_W-1:0] cfg_addr;
  logic [DATA_W-1:0] cfg_wdata, cfg_rdata;
  sample_t           vmem_out;
  logic              spike_out;

  spu dut (.clk(clk), .rst(rst), .syn_in(syn_in), .vmem_chain_in('0),
           .cfg_rst(cfg_rst), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
           .cfg_rdata(cfg_rdata), .vmem_out(vmem_out), .spike_out(spike_out));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [N_SYN-1:0] pat [N_PAT][MAXLEN];
  int               pat_len [N_PAT];   // last input step + 1 + SETTLE

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference run of one pattern: output cycle t sees the spikes of step t-1.
  function automatic void model_run(input int p [N_PAR], input int k, output int n_spk,
                                    output int first, output int trace [MAXLEN+1]);
    ref_iir f;
    f = new();
    f.set_coefs(p[N_SYN+1], p[N_SYN+2], p[N_SYN+3], p[N_SYN+4], p[N_SYN+5]);
    n_spk = 0;
    first = -1;
    for (int t = 0; t <= pat_len[k]; t++) begin
      int x, y;
      x = 0;
      if (t > 0) begin
        int g [N_SYN];
        for (int m = 0; m < N_SYN; m++) g[m] = pat[k][t-1][m] ? p[m] : 0;
        x = ref_clamp(ref_clamp(g[0] + g[1]) + ref_clamp(g[2] + g[3]));
      end
      y = f.step(x);
      trace[t] = y;
      if (y >= p[N_SYN]) begin
        n_spk++;
        if (first < 0) first = t;
      end
    end
  endfunction

  // Search objective: 0 when A and B each give one spike at different times
  // and the five training noise patterns give none.
  function automatic int cost(input int p [N_PAR]);
    int c, n, fa, fb, f;
    int tr [MAXLEN+1];
    model_run(p, 0, n, fa, tr);
    c = (n > 1) ? n - 1 : (n == 0 ? 3 : 0);
    model_run(p, 1, n, fb, tr);
    c += (n > 1) ? n - 1 : (n == 0 ? 3 : 0);
    if (fa >= 0 && fa == fb) c += 2;
    for (int k = 2; k < 7; k++) begin
      model_run(p, k, n, f, tr);
      c += n;
    end
    return c;
  endfunction

  function automatic int rand_param(input int i);
    if (i <= N_SYN) return int'($urandom_range(0, 63)) - 32;  // weights, Vth
    return $urandom_range(0, 15);                             // coefficient code
  endfunction

  task automatic write_reg(input int a, input int d);
    cfg_we = 1;
    cfg_addr = ADDR_W'(a);
    cfg_wdata = DATA_W'(d & 63);
    @(posedge clk); #1;
    cfg_we = 0;
  endtask

  // Apply pattern k to the hardware from reset and compare with the model.
  task automatic hw_run(input int p [N_PAR], input int k, output int n_hw, output int first_hw);
    int n_ref, first_ref;
    int tr [MAXLEN+1];
    model_run(p, k, n_ref, first_ref, tr);
    rst = 1; syn_in = '0;
    @(posedge clk); #1;
    rst = 0;
    n_hw = 0;
    first_hw = -1;
    for (int t = 0; t <= pat_len[k]; t++) begin
      syn_in = (t < pat_len[k]) ? pat[k][t] : '0;
      #1;
      checks++;
      if (int'(vmem_out) != tr[t]) begin
        failures++;
        $display("FAIL pattern %0d t=%0d: vmem=%0d, expected %0d", k, t, vmem_out, tr[t]);
      end
      if (spike_out) begin
        n_hw++;
        if (first_hw < 0) first_hw = t;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (n_hw != n_ref || first_hw != first_ref) begin
      failures++;
      $display("FAIL pattern %0d: %0d spikes first at %0d, model %0d first at %0d",
               k, n_hw, first_hw, n_ref, first_ref);
    end
  endtask

  initial begin
    int best [N_PAR], cand [N_PAR];
    int best_c, c, evals, restarts;
    int n_a, n_b, f_a, f_b, n, f, fresh_spikes;

    // patterns
    for (int k = 0; k < N_PAT; k++)
      for (int t = 0; t < MAXLEN; t++) pat[k][t] = '0;
    pat[0][1] = 4'b0011; pat[0][3] = 4'b0100; pat_len[0] = 4 + SETTLE;
    pat[1][0] = 4'b1000; pat[1][5] = 4'b0101; pat_len[1] = 6 + SETTLE;
    for (int k = 2; k < N_PAT; k++) begin
      int last;
      last = 0;
      for (int i = 0; i < 4; i++) begin
        int t;
        t = $urandom_range(0, 5);
        pat[k][t] |= 4'(1 << $urandom_range(0, 3));
        if (t > last) last = t;
      end
      pat_len[k] = last + 1 + SETTLE;
    end

    // hill-climbing search with restarts, scored by the reference model
    best_c = 1 << 30;
    evals = 0;
    restarts = 0;
    while (best_c > 0 && restarts < 400) begin
      int cur [N_PAR];
      int cur_c;
      for (int i = 0; i < N_PAR; i++) cur[i] = rand_param(i);
      cur_c = cost(cur);
      for (int it = 0; it < 400 && cur_c > 0; it++) begin
        int i;
        cand = cur;
        i = $urandom_range(0, N_PAR - 1);
        cand[i] = rand_param(i);
        c = cost(cand);
        evals++;
        if (c <= cur_c) begin
          cur = cand;
          cur_c = c;
        end
      end
      if (cur_c < best_c) begin
        best = cur;
        best_c = cur_c;
      end
      restarts++;
    end
    $display("search: %0d evaluations, %0d restarts, best cost %0d", evals, restarts, best_c);
    $display("parameters: w = %0d %0d %0d %0d, Vth = %0d", best[0], best[1], best[2], best[3],
             best[4]);
    $display("            b0 = %f, b1 = %f, b2 = %f, a1 = %f, a2 = %f",
             ref_coef_value(best[5]), ref_coef_value(best[6]), ref_coef_value(best[7]),
             ref_coef_value(best[8]), ref_coef_value(best[9]));
    checks++;
    if (best_c != 0) begin
      failures++;
      $display("FAIL no parameter set separates the patterns");
    end

    // load it into the hardware
    rst = 1; cfg_rst = 1; cfg_we = 0; cfg_addr = '0; cfg_wdata = '0; syn_in = '0;
    @(posedge clk); #1;
    cfg_rst = 0;
    for (int i = 0; i < N_PAR; i++) write_reg(i, best[i]);
    write_reg(N_SYN + 6, 0);
    for (int i = 0; i < N_PAR; i++) begin
      cfg_addr = ADDR_W'(i);
      #1;
      checks++;
      if (int'(cfg_rdata) != (best[i] & 63)) begin
        failures++;
        $display("FAIL parameter %0d read back as %0d", i, cfg_rdata);
      end
    end

    // run the patterns on the hardware
    hw_run(best, 0, n_a, f_a);
    hw_run(best, 1, n_b, f_b);
    $display("pattern A: %0d spike(s), first at cycle %0d", n_a, f_a);
    $display("pattern B: %0d spike(s), first at cycle %0d", n_b, f_b);
    checks++;
    if (n_a != 1 || n_b != 1 || f_a == f_b) begin
      failures++;
      $display("FAIL hardware does not separate A and B");
    end
    for (int k = 2; k < 7; k++) begin
      hw_run(best, k, n, f);
      checks++;
      if (n != 0) begin
        failures++;
        $display("FAIL training noise pattern %0d gave %0d spikes", k - 2, n);
      end
    end
    fresh_spikes = 0;
    for (int k = 7; k < N_PAT; k++) begin
      hw_run(best, k, n, f);
      fresh_spikes += n;
    end
    $display("fresh noise patterns: %0d spike(s) in total over 5 patterns", fresh_spikes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
