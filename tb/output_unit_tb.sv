// output_unit_tb: random VC allocations, flit departures and credit returns against a
// reference model of the idle/active state and credit count of each output VC. Covers
// running out of credits and freeing a VC with a tail flit.
module output_unit_tb;
  import noc_pkg::*;
  localparam int V = 2, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic [V-1:0] alloc, ovc_idle, credit_ok;
  logic send_valid, credit_valid;
  logic [31:0] send_flit;
  logic [VCID_W-1:0] credit_vc;
  logic [V*3-1:0] credits;
  int m_cnt[V];
  bit m_act[V];
  int checks = 0, failures = 0, zero_credit = 0, frees = 0;

  output_unit #(.V(V), .DEPTH(DEPTH)) dut (.clk, .rst_n, .alloc, .send_valid, .send_flit,
    .credit_valid, .credit_vc, .ovc_idle, .credit_ok, .credits);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc = 0; send_valid = 0; credit_valid = 0; send_flit = 0; credit_vc = 0;
    for (int v = 0; v < V; v++) begin m_cnt[v] = DEPTH; m_act[v] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      for (int v = 0; v < V; v++) begin
        checks++;
        if (ovc_idle[v] != !m_act[v] || credit_ok[v] != (m_cnt[v] > 0) || int'(credits[v*3 +: 3]) != m_cnt[v]) begin
          failures++; $display("FAIL k=%0d vc%0d idle=%b ok=%b cnt=%0d exp act=%0d cnt=%0d", k, v, ovc_idle[v], credit_ok[v], credits[v*3 +: 3], m_act[v], m_cnt[v]);
        end
        if (m_cnt[v] == 0) zero_credit++;
      end
      // stimulus obeying the protocol
      alloc = '0;
      for (int v = 0; v < V; v++) if (!m_act[v] && $urandom_range(0, 3) == 0) alloc[v] = 1;
      begin
        int sv; hdr_t h;
        sv = $urandom_range(0, V-1);
        send_valid = (m_act[sv] || alloc[sv]) && m_cnt[sv] > 0 && $urandom_range(0, 1) == 1;
        h = hdr_t'($urandom);
        h.vcid = VCID_W'(sv);
        h.ftype = ($urandom_range(0, 4) == 0) ? FT_TAIL : FT_BODY;
        send_flit = h;
        credit_vc = VCID_W'($urandom_range(0, V-1));
        credit_valid = m_cnt[credit_vc] < DEPTH && $urandom_range(0, 2) == 0;
        @(posedge clk);
        #1;
        for (int v = 0; v < V; v++) if (alloc[v]) m_act[v] = 1;
        if (send_valid) begin
          m_cnt[sv]--;
          if (h.ftype == FT_TAIL) begin m_act[sv] = 0; frees++; end
        end
        if (credit_valid) m_cnt[credit_vc]++;
      end
    end
    checks++;
    if (zero_credit == 0 || frees == 0) begin failures++; $display("FAIL coverage zero=%0d frees=%0d", zero_credit, frees); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
