// tb_spu: end-to-end test of the Spike Processing Unit at its default size
// (four synapses, 6-bit arithmetic).
//
// Two SPUs are instantiated: u_a is driven by spike patterns; u_b takes u_a's
// membrane potential on its chain input, so that with its select bit set the
// pair forms one fourth-order filter. Every cycle, both membrane potentials
// and spike outputs are compared with an integer reference model (synapse
// register, saturating adder tree, direct form II filter, comparator).
//
// Stimulus:
//  - the two spatio-temporal test patterns of the model's RTL validation:
//    synapses 0 and 1 at step 1 and synapse 2 at step 3; synapse 3 at step 30
//    and synapses 2 and 0 at step 35, over a 60-step window;
//  - five random noise patterns of the same length, one reset between each;
//  - u_a switched to its chain input in the middle of a run and back;
//  - a reset in the middle of activity (the global-inhibition use of RST);
//  - random parameter sets with dense random input.
// The latency from an input spike to its first effect on Vmem (one cycle)
// is checked directly. Each mechanism is counted and must occur at least once:
// output spike, adder saturation, chained fourth-order operation, select
// switch, reset of an active neuron, configuration read-back.
module tb_spu;
  import spu_pkg::*;
  import spu_ref_pkg::*;

  localparam int N_SYN  = 4;
  localparam int ADDR_W = $clog2(N_SYN + 7);
  localparam int A_VTH = N_SYN, A_B0 = N_SYN + 1, A_SEL = N_SYN + 6;

  logic              clk = 0;
  logic              rst, cfg_rst;
  logic [N_SYN-1:0]  spikes_a, spikes_b;
  sample_t           chain_a;
  logic              we_a, we_b;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] wdata, rdata_a, rdata_b;
  sample_t           vmem_a, vmem_b;
  logic              spike_a, spike_b;

  spu u_a (.clk(clk), .rst(rst), .syn_in(spikes_a), .vmem_chain_in(chain_a),
           .cfg_rst(cfg_rst), .cfg_we(we_a), .cfg_addr(addr), .cfg_wdata(wdata),
           .cfg_rdata(rdata_a), .vmem_out(vmem_a), .spike_out(spike_a));

  spu u_b (.clk(clk), .rst(rst), .syn_in(spikes_b), .vmem_chain_in(vmem_a),
           .cfg_rst(cfg_rst), .cfg_we(we_b), .cfg_addr(addr), .cfg_wdata(wdata),
           .cfg_rdata(rdata_b), .vmem_out(vmem_b), .spike_out(spike_b));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_spike_a = 0, n_spike_b = 0, n_sat = 0, n_chain = 0, n_switch = 0;
  int n_inhibit = 0, n_readback = 0;

  // reference state
  ref_iir m_a, m_b;
  int w_a [N_SYN], w_b [N_SYN];
  int vth_a, vth_b, sel_a, sel_b;
  int spk_q_a [N_SYN], spk_q_b [N_SYN];
  int tree_sat = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat_sum(int a, int b);
    if (a + b > 31 || a + b < -32) tree_sat++;
    return ref_clamp(a + b);
  endfunction

  function automatic int syn_x(int w [N_SYN], int q [N_SYN]);
    int g [N_SYN];
    for (int m = 0; m < N_SYN; m++) g[m] = q[m] ? w[m] : 0;
    return sat_sum(sat_sum(g[0], g[1]), sat_sum(g[2], g[3]));
  endfunction

  // One clock cycle. Called just after a rising edge: checks the outputs of
  // the present cycle against the model, applies the inputs to be sampled at
  // the next edge, and advances the model to match that edge.
  task automatic cycle(input logic [N_SYN-1:0] sa, input int chain_in, input bit do_rst,
                       input bit wa, input bit wb, input int a, input int d,
                       output int ya_o);
    int xa, xb, ya, yb;
    xa = sel_a ? chain_in : syn_x(w_a, spk_q_a);
    chain_a = sample_t'(chain_in);
    spikes_a = sa;
    spikes_b = '0;
    rst = do_rst;
    we_a = wa; we_b = wb;
    addr = ADDR_W'(a);
    wdata = DATA_W'(d);
    #1;
    ya = m_a.step(xa);
    xb = sel_b ? ya : syn_x(w_b, spk_q_b);
    yb = m_b.step(xb);
    ya_o = ya;
    checks++;
    if (int'(vmem_a) != ya || spike_a != (ya >= vth_a)) begin
      failures++;
      $display("FAIL %0t u_a: vmem=%0d spike=%0d, expected %0d %0d", $time, vmem_a, spike_a,
               ya, ya >= vth_a);
    end
    checks++;
    if (int'(vmem_b) != yb || spike_b != (yb >= vth_b)) begin
      failures++;
      $display("FAIL %0t u_b: vmem=%0d spike=%0d, expected %0d %0d", $time, vmem_b, spike_b,
               yb, yb >= vth_b);
    end
    if (ya >= vth_a) n_spike_a++;
    if (yb >= vth_b) n_spike_b++;
    if (sel_b) n_chain++;
    @(posedge clk);
    #1;
    // model of what that edge did
    for (int m = 0; m < N_SYN; m++) begin
      spk_q_a[m] = do_rst ? 0 : int'(sa[m]);
      spk_q_b[m] = 0;
    end
    if (do_rst) begin
      if (m_a.s1 != 0 || m_a.s2 != 0) n_inhibit++;
      m_a.reset();
      m_b.reset();
    end
    if (wa) model_write(1, a, d);
    if (wb) model_write(0, a, d);
    rst = 0; we_a = 0; we_b = 0;
  endtask

  function automatic int sext6(int d);
    return (d >= 32) ? d - 64 : d;
  endfunction

  function automatic void model_write(bit is_a, int a, int d);
    if (a < N_SYN) begin
      if (is_a) w_a[a] = sext6(d); else w_b[a] = sext6(d);
    end else if (a == A_VTH) begin
      if (is_a) vth_a = sext6(d); else vth_b = sext6(d);
    end else if (a == A_SEL) begin
      if (is_a) begin
        if (sel_a != d % 2) n_switch++;
        sel_a = d % 2;
      end else begin
        if (sel_b != d % 2) n_switch++;
        sel_b = d % 2;
      end
    end else if (a >= A_B0 && a < A_SEL) begin
      ref_iir mm;
      mm = is_a ? m_a : m_b;
      case (a - A_B0)
        0: mm.b0 = d % 16;
        1: mm.b1 = d % 16;
        2: mm.b2 = d % 16;
        3: mm.a1 = d % 16;
        default: mm.a2 = d % 16;
      endcase
    end
  endfunction

  // Idle cycles with no input.
  task automatic idle(input int n);
    int y;
    repeat (n) cycle('0, 0, 0, 0, 0, 0, 0, y);
  endtask

  // Load a full parameter vector (w0..w3, Vth, b0, b1, b2, a1, a2, sel) into
  // one SPU, holding rst so that the filter state stays at zero.
  task automatic load(input bit is_a, input int p [N_SYN + 7]);
    int y;
    for (int a = 0; a < N_SYN + 7; a++)
      cycle('0, 0, 1, is_a, !is_a, a, p[a] & 63, y);
  endtask

  // Read back one register of u_a and compare with the expected value.
  task automatic readback(input int a, input int expected);
    addr = ADDR_W'(a);
    #1;
    checks++;
    n_readback++;
    if (int'(rdata_a) != (expected & 63)) begin
      failures++;
      $display("FAIL read-back addr %0d: %0d, expected %0d", a, rdata_a, expected & 63);
    end
  endtask

  // Run one 60-step input window; spike events are given as (step, mask).
  task automatic run_window(input int steps [], input logic [N_SYN-1:0] masks [],
                            output int first_spike);
    int y;
    first_spike = -1;
    for (int t = 0; t < 60; t++) begin
      logic [N_SYN-1:0] s;
      s = '0;
      foreach (steps[i]) if (steps[i] == t) s |= masks[i];
      cycle(s, 0, 0, 0, 0, 0, 0, y);
      if (y >= vth_a && first_spike < 0) first_spike = t;
    end
  endtask

  initial begin
    // parameter vectors: w0 w1 w2 w3 Vth b0 b1 b2 a1 a2 sel
    // codes: 1 = x2, 2 = x1, 3 = x1/2, 4 = x1/4, +8 = negative
    int pa [N_SYN + 7] = '{9, 8, -12, 14, 16, 1, 0, 10, 10, 3, 0};
    int pb [N_SYN + 7] = '{0, 0, 0, 0, 12, 2, 3, 0, 11, 4, 1};
    int first_a, first_b, y;
    int st [];
    logic [N_SYN-1:0] mk [];

    m_a = new();
    m_b = new();
    foreach (spk_q_a[m]) begin spk_q_a[m] = 0; spk_q_b[m] = 0; end
    rst = 1; cfg_rst = 1; we_a = 0; we_b = 0; addr = '0; wdata = '0;
    spikes_a = '0; spikes_b = '0; chain_a = '0;
    @(posedge clk);
    @(posedge clk);
    #1 cfg_rst = 0;
    foreach (w_a[m]) begin w_a[m] = 0; w_b[m] = 0; end
    vth_a = 31; vth_b = 31; sel_a = 0; sel_b = 0;
    // defaults after cfg_rst
    readback(A_VTH, 31);
    readback(0, 0);
    load(1, pa);
    load(0, pb);
    for (int a = 0; a < N_SYN + 7; a++) readback(a, (a >= A_B0 && a < A_SEL) ? pa[a] % 16 : pa[a]);

    // latency: a spike sampled at one edge moves Vmem in the next cycle only
    cycle(4'b0001, 0, 0, 0, 0, 0, 0, y);
    checks++;
    if (y != 0) begin failures++; $display("FAIL input reached Vmem before its clock edge"); end
    cycle('0, 0, 0, 0, 0, 0, 0, y);
    checks++;
    if (y == 0) begin failures++; $display("FAIL input did not reach Vmem one cycle later"); end
    idle(1);
    cycle('0, 0, 1, 0, 0, 0, 0, y);

    // pattern 1 and pattern 2 on one time axis
    st = '{1, 1, 3, 30, 35, 35};
    mk = '{4'b0001, 4'b0010, 4'b0100, 4'b1000, 4'b0100, 4'b0001};
    run_window(st, mk, first_a);
    $display("test patterns: first output spike of u_a at step %0d", first_a);
    checks++;
    if (first_a < 0) begin failures++; $display("FAIL the test patterns produced no spike"); end
    cycle('0, 0, 1, 0, 0, 0, 0, y);

    // five random noise windows, each from reset
    for (int k = 0; k < 5; k++) begin
      st = new[6];
      mk = new[6];
      foreach (st[i]) begin
        st[i] = $urandom_range(0, 49);
        mk[i] = 4'(1 << $urandom_range(0, 3));
      end
      run_window(st, mk, first_b);
      $display("noise window %0d: first spike at step %0d", k, first_b);
      cycle('0, 0, 1, 0, 0, 0, 0, y);
    end

    // inhibition: reset while the filter is ringing
    cycle(4'b1001, 0, 0, 0, 0, 0, 0, y);
    idle(2);
    cycle('0, 0, 1, 0, 0, 0, 0, y);
    idle(3);

    // mode switch: u_a takes its chain input for a while, then back
    cycle('0, 0, 0, 1, 0, A_SEL, 1, y);
    for (int n = 0; n < 30; n++)
      cycle('0, (n % 7 == 0) ? int'($urandom_range(0, 63)) - 32 : 0, 0, 0, 0, 0, 0, y);
    cycle('0, 0, 0, 1, 0, A_SEL, 0, y);
    readback(A_SEL, 0);
    idle(5);

    // random parameter sets and dense random spikes
    for (int r = 0; r < 20; r++) begin
      int p [N_SYN + 7];
      for (int a = 0; a < N_SYN + 1; a++) p[a] = int'($urandom_range(0, 63)) - 32;
      for (int a = A_B0; a < A_SEL; a++) p[a] = $urandom_range(0, 15);
      p[A_SEL] = 0;
      load(1, p);
      p[A_SEL] = 1;
      for (int a = A_B0; a < A_SEL; a++) p[a] = $urandom_range(0, 15);
      p[A_VTH] = $urandom_range(0, 20);
      load(0, p);
      cycle('0, 0, 1, 0, 0, 0, 0, y);
      for (int n = 0; n < 40; n++)
        cycle(4'($urandom_range(0, 15)) & 4'($urandom_range(0, 15)), 0, 0, 0, 0, 0, 0, y);
    end

    n_sat = m_a.sat_events + m_b.sat_events + tree_sat;
    $display("mechanisms: spikes_a=%0d spikes_b=%0d saturations=%0d chained_cycles=%0d",
             n_spike_a, n_spike_b, n_sat, n_chain);
    $display("            select_switches=%0d inhibit_resets=%0d readbacks=%0d",
             n_switch, n_inhibit, n_readback);
    checks++; if (n_spike_a == 0) begin failures++; $display("FAIL no spike on u_a"); end
    checks++; if (n_spike_b == 0) begin failures++; $display("FAIL no spike on u_b"); end
    checks++; if (n_sat == 0)     begin failures++; $display("FAIL no saturation"); end
    checks++; if (n_chain == 0)   begin failures++; $display("FAIL no chained operation"); end
    checks++; if (n_switch == 0)  begin failures++; $display("FAIL no select switch"); end
    checks++; if (n_inhibit == 0) begin failures++; $display("FAIL no reset of an active neuron"); end
    checks++; if (n_readback == 0) begin failures++; $display("FAIL no read-back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
