// tb_spu_timing: spike-timing dependence of a single synapse.
//
// Shows the central property of the SPU: the effect of an input spike
// depends on when it arrives relative to the ringing of the filter. Only
// synapse 2 is used. The testbench searches, with the integer reference
// model, for a parameter set for which
//   - one input spike leaves the neuron below threshold but ringing (the
//     membrane changes sign at least twice: a subthreshold oscillation), and
//   - a second spike D steps after the first makes the neuron fire for some
//     D in 1..10 and not for others, so the same spike is excitatory at one
//     arrival time and ineffective at another.
// It then loads the set into the SPU and applies the single spike and every
// pair interval D = 1..10 (each from reset, 30 steps after the last input),
// comparing the membrane trace and the spikes with the model every cycle and
// checking that both regimes occur in hardware.
module tb_spu_timing;
  import spu_pkg::*;
  import spu_ref_pkg::*;

  localparam int N_SYN  = 4;
  localparam int ADDR_W = $clog2(N_SYN + 7);
  localparam int SYN    = 2;
  localparam int TAIL   = 30;
  localparam int MAXD   = 10;

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

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // p: weight of synapse 2, Vth, b0, b1, b2, a1, a2 (codes). d = 0: one spike.
  // Returns the number of output spikes and the sign changes of the membrane.
  function automatic int model_run(input int p [7], input int d, output int sign_changes,
                                   output int trace [TAIL + MAXD + 2]);
    ref_iir f;
    int n, prev;
    f = new();
    f.set_coefs(p[2], p[3], p[4], p[5], p[6]);
    n = 0;
    prev = 0;
    sign_changes = 0;
    for (int t = 0; t < d + TAIL + 2; t++) begin
      int x, y;
      // input spikes at steps 0 and d reach x one cycle later
      x = (t == 1 || (d > 0 && t == d + 1)) ? p[0] : 0;
      y = f.step(x);
      trace[t] = y;
      if (y >= p[1]) n++;
      if (y != 0) begin
        if (prev != 0 && ((y > 0) != (prev > 0))) sign_changes++;
        prev = y;
      end
    end
    return n;
  endfunction

  function automatic int cost(input int p [7]);
    int c, sc, fire, quiet, n;
    int tr [TAIL + MAXD + 2];
    c = 3 * model_run(p, 0, sc, tr);
    if (sc < 2) c += 2 - sc;
    fire = 0;
    quiet = 0;
    for (int d = 1; d <= MAXD; d++) begin
      n = model_run(p, d, sc, tr);
      if (n > 0) fire++; else quiet++;
    end
    if (fire == 0) c += 2;
    if (quiet == 0) c += 2;
    return c;
  endfunction

  function automatic int rand_param(input int i);
    if (i <= 1) return int'($urandom_range(0, 63)) - 32;
    return $urandom_range(0, 15);
  endfunction

  task automatic write_reg(input int a, input int d);
    cfg_we = 1;
    cfg_addr = ADDR_W'(a);
    cfg_wdata = DATA_W'(d & 63);
    @(posedge clk); #1;
    cfg_we = 0;
  endtask

  task automatic hw_run(input int p [7], input int d, output int n_hw);
    int n_ref, sc;
    int tr [TAIL + MAXD + 2];
    n_ref = model_run(p, d, sc, tr);
    rst = 1; syn_in = '0;
    @(posedge clk); #1;
    rst = 0;
    n_hw = 0;
    for (int t = 0; t < d + TAIL + 2; t++) begin
      syn_in = '0;
      if (t == 0 || (d > 0 && t == d)) syn_in[SYN] = 1'b1;
      #1;
      checks++;
      if (int'(vmem_out) != tr[t] || spike_out != (tr[t] >= p[1])) begin
        failures++;
        $display("FAIL D=%0d t=%0d: vmem=%0d spike=%0d, expected %0d", d, t, vmem_out,
                 spike_out, tr[t]);
      end
      if (spike_out) n_hw++;
      @(posedge clk); #1;
    end
    checks++;
    if (n_hw != n_ref) begin
      failures++;
      $display("FAIL D=%0d: %0d spikes, model %0d", d, n_hw, n_ref);
    end
  endtask

  initial begin
    int best [7], cand [7], cur [7];
    int best_c, cur_c, c, restarts, n, fire, quiet;
    string line;

    best_c = 1 << 30;
    restarts = 0;
    while (best_c > 0 && restarts < 400) begin
      for (int i = 0; i < 7; i++) cur[i] = rand_param(i);
      cur_c = cost(cur);
      for (int it = 0; it < 400 && cur_c > 0; it++) begin
        int i;
        cand = cur;
        i = $urandom_range(0, 6);
        cand[i] = rand_param(i);
        c = cost(cand);
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
    $display("search: %0d restarts, best cost %0d", restarts, best_c);
    $display("parameters: w2 = %0d, Vth = %0d, b0 = %f, b1 = %f, b2 = %f, a1 = %f, a2 = %f",
             best[0], best[1], ref_coef_value(best[2]), ref_coef_value(best[3]),
             ref_coef_value(best[4]), ref_coef_value(best[5]), ref_coef_value(best[6]));
    checks++;
    if (best_c != 0) begin
      failures++;
      $display("FAIL no parameter set shows both regimes");
    end

    rst = 1; cfg_rst = 1; cfg_we = 0; cfg_addr = '0; cfg_wdata = '0; syn_in = '0;
    @(posedge clk); #1;
    cfg_rst = 0;
    write_reg(SYN, best[0]);
    write_reg(N_SYN, best[1]);
    for (int i = 0; i < 5; i++) write_reg(N_SYN + 1 + i, best[2 + i]);

    hw_run(best, 0, n);
    checks++;
    if (n != 0) begin
      failures++;
      $display("FAIL a single spike made the neuron fire");
    end
    fire = 0;
    quiet = 0;
    line = "";
    for (int d = 1; d <= MAXD; d++) begin
      hw_run(best, d, n);
      line = {line, $sformatf(" D=%0d:%0d", d, n)};
      if (n > 0) fire++; else quiet++;
    end
    $display("output spikes per pair interval:%s", line);
    checks++;
    if (fire == 0 || quiet == 0) begin
      failures++;
      $display("FAIL hardware shows only one regime (fire %0d, quiet %0d)", fire, quiet);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
