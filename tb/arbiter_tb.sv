// arbiter_tb: checks the fixed-priority arbiter against the priority-encoder truth table
// and the round-robin arbiter against a reference pointer model, with random requests and
// random pointer updates.
module arbiter_tb;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt_f, gnt_r;
  logic [1:0]   idx_f, idx_r;
  logic any_f, any_r, upd;
  int checks = 0, failures = 0;
  int last;

  arbiter #(.N(N), .ROUND_ROBIN(1'b0)) u_fixed (.clk, .rst_n, .req, .upd, .gnt(gnt_f), .gnt_idx(idx_f), .any_gnt(any_f));
  arbiter #(.N(N), .ROUND_ROBIN(1'b1)) u_rr    (.clk, .rst_n, .req, .upd, .gnt(gnt_r), .gnt_idx(idx_r), .any_gnt(any_r));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] exp_fixed(logic [N-1:0] r);
    for (int i = 0; i < N; i++) if (r[i]) return N'(1) << i;
    return '0;
  endfunction

  function automatic logic [N-1:0] exp_rr(logic [N-1:0] r, int l);
    for (int i = 1; i <= N; i++) if (r[(l + i) % N]) return N'(1) << ((l + i) % N);
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
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; upd = 0; last = N - 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Table II rows
    foreach (req[i]) begin
      @(negedge clk);
      req = N'(1) << i | (i < N-1 ? N'($urandom) << (i+1) : '0);
      #1 check("fixed row", gnt_f, N'(1) << i);
    end
    // Fairness: all-ones request with updates must visit every line in turn
    @(negedge clk);
    req = '1; upd = 1;
    for (int k = 0; k < 2*N; k++) begin
      #1 check("rr rotate", gnt_r, exp_rr(req, last));
      if (any_r) last = idx_r;
      @(negedge clk);
    end
    // Random
    for (int k = 0; k < 1000; k++) begin
      req = N'($urandom);
      upd = $urandom_range(0, 1) == 1;
      #1;
      check("fixed", gnt_f, exp_fixed(req));
      check("rr", gnt_r, exp_rr(req, last));
      checks++;
      if (any_r != (req != 0) || (any_r && gnt_r != (N'(1) << idx_r))) begin
        failures++; $display("FAIL any/idx");
      end
      if (upd && any_r) last = idx_r;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
