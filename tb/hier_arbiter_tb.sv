// hier_arbiter_tb: checks the two-level arbiter built from small arbiters.
// Fixed priority (GROUPS=2, SIZE=5) is compared with "lowest group, then lowest line".
// The round-robin version is compared with a reference model: a pointer per group and
// one for the group level. Group pointers move only when their group wins and upd is
// high. A starvation check with all lines requesting follows.
module hier_arbiter_tb;
  localparam int G = 2, S = 5, N = G * S;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt_f, gnt_r;
  logic any_f, any_r, upd;
  int checks = 0, failures = 0;
  int gl[G], tl;

  hier_arbiter #(.GROUPS(G), .SIZE(S), .ROUND_ROBIN(1'b0)) u_fixed (.clk, .rst_n, .req, .upd, .gnt(gnt_f), .any_gnt(any_f));
  hier_arbiter #(.GROUPS(G), .SIZE(S), .ROUND_ROBIN(1'b1)) u_rr    (.clk, .rst_n, .req, .upd, .gnt(gnt_r), .any_gnt(any_r));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] exp_fixed(logic [N-1:0] r);
    for (int i = 0; i < N; i++) if (r[i]) return N'(1) << i;
    return '0;
  endfunction

  // returns winning line, or -1; group pointer l means line l was last served
  function automatic int rr_pick(logic [N-1:0] r, int g, int l);
    for (int i = 1; i <= S; i++) if (r[g*S + (l + i) % S]) return (l + i) % S;
    return -1;
  endfunction

  function automatic logic [N-1:0] exp_rr(logic [N-1:0] r, output int wg, output int wl);
    wg = -1; wl = -1;
    for (int i = 1; i <= G; i++) begin
      int g = (tl + i) % G;
      int l = rr_pick(r, g, gl[g]);
      if (l >= 0) begin wg = g; wl = l; return N'(1) << (g*S + l); end
    end
    return '0;
  endfunction

  task automatic check(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s req=%b got=%b exp=%b", what, req, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wg, wl;
    int served[N];
    logic [N-1:0] e;
    req = '0; upd = 0; tl = G - 1;
    foreach (gl[g]) gl[g] = S - 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      req = N'($urandom) & N'($urandom);
      if (k % 7 == 0) req = '0;
      upd = ($urandom % 4) != 0;
      #1;
      check("fixed", gnt_f, exp_fixed(req));
      checks++;
      if (any_f !== (req != '0)) begin failures++; $display("FAIL any_gnt"); end
      e = exp_rr(req, wg, wl);
      check("rr", gnt_r, e);
      if (upd && wg >= 0) begin tl = wg; gl[wg] = wl; end
    end
    // starvation: all lines requesting, with updates, each served exactly twice in 2N cycles
    foreach (served[i]) served[i] = 0;
    @(negedge clk);
    req = '1; upd = 1;
    for (int k = 0; k < 2*N; k++) begin
      #1;
      for (int i = 0; i < N; i++) if (gnt_r[i]) served[i]++;
      e = exp_rr(req, wg, wl);
      if (wg >= 0) begin tl = wg; gl[wg] = wl; end
      @(negedge clk);
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (served[i] != 2) begin failures++; $display("FAIL line %0d served %0d times", i, served[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
