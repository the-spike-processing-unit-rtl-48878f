// tb_spu_cfg_regs: checks the SPU parameter registers.
// Checks the quiet defaults after cfg_rst, then writes random values to every
// address, in random order, and checks both the decoded outputs and the
// read-back port against a shadow copy. Writes with cfg_we low and to unused
// addresses must change nothing.
module tb_spu_cfg_regs;
  import spu_pkg::*;

  localparam int N_SYN  = 4;
  localparam int N_REGS = N_SYN + 7;
  localparam int ADDR_W = $clog2(N_REGS);

  logic              clk = 0, cfg_rst, cfg_we;
  logic [ADDR_W-1:0] cfg_addr;
  logic [DATA_W-1:0] cfg_wdata, cfg_rdata;
  sample_t           weights [N_SYN];
  sample_t           vth;
  iir_coefs_t        coefs;
  logic              sel;
  int checks = 0, failures = 0;
  int shadow [N_REGS];

  spu_cfg_regs dut (.clk(clk), .cfg_rst(cfg_rst), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
                    .cfg_wdata(cfg_wdata), .cfg_rdata(cfg_rdata), .weights(weights),
                    .vth(vth), .coefs(coefs), .sel(sel));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int expected, input string what);
    checks++;
    if (got != expected) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, expected);
    end
  endtask

  // Compare every decoded output and every read-back value with the shadow.
  task automatic check_all(input string when);
    for (int m = 0; m < N_SYN; m++)
      expect_eq(int'(weights[m]), shadow[m], $sformatf("%s weight %0d", when, m));
    expect_eq(int'(vth), shadow[N_SYN], {when, " vth"});
    expect_eq(int'(coefs.b0), shadow[N_SYN+1], {when, " b0"});
    expect_eq(int'(coefs.b1), shadow[N_SYN+2], {when, " b1"});
    expect_eq(int'(coefs.b2), shadow[N_SYN+3], {when, " b2"});
    expect_eq(int'(coefs.a1), shadow[N_SYN+4], {when, " a1"});
    expect_eq(int'(coefs.a2), shadow[N_SYN+5], {when, " a2"});
    expect_eq(int'(sel), shadow[N_SYN+6], {when, " sel"});
    for (int a = 0; a < N_REGS; a++) begin
      int raw;
      cfg_addr = ADDR_W'(a);
      #1;
      raw = (a < N_SYN + 1) ? int'($signed(cfg_rdata)) : int'(cfg_rdata);
      expect_eq(raw, shadow[a], $sformatf("%s read-back addr %0d", when, a));
    end
  endtask

  initial begin
    cfg_rst = 1; cfg_we = 0; cfg_addr = '0; cfg_wdata = '0;
    @(posedge clk); #1;
    cfg_rst = 0;
    foreach (shadow[i]) shadow[i] = 0;
    shadow[N_SYN] = 31;
    check_all("default");
    for (int n = 0; n < 300; n++) begin
      int a, d;
      a = $urandom_range(0, (1 << ADDR_W) - 1);
      d = $urandom_range(0, 63);
      cfg_we    = ($urandom_range(0, 4) != 0);
      cfg_addr  = ADDR_W'(a);
      cfg_wdata = DATA_W'(d);
      @(posedge clk); #1;
      if (cfg_we && a < N_REGS) begin
        if (a <= N_SYN)          shadow[a] = (d >= 32) ? d - 64 : d;
        else if (a < N_SYN + 6)  shadow[a] = d % 16;
        else                     shadow[a] = d % 2;
      end
      cfg_we = 0;
      if (n % 10 == 0) check_all($sformatf("step %0d", n));
    end
    check_all("end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
