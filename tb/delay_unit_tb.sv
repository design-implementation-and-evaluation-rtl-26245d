// delay_unit_tb: random valid/data stream through a 3-stage delay; the output must equal
// the input presented three cycles earlier (visible after the third clock edge).
module delay_unit_tb;
  localparam int D = 3, W = 32;
  logic clk = 0, rst_n = 0;
  logic iv, ov;
  logic [W-1:0] id, od;
  logic hv[$];
  logic [W-1:0] hd[$];
  int checks = 0, failures = 0;

  delay_unit #(.DELAY(D), .W(W)) dut (.clk, .rst_n, .in_valid(iv), .in_data(id), .out_valid(ov), .out_data(od));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; id = 0;
    for (int i = 0; i < D - 1; i++) begin hv.push_back(1'b0); hd.push_back('0); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      iv = $urandom_range(0, 1) == 1; id = $urandom;
      @(posedge clk); #1;
      hv.push_back(iv); hd.push_back(id);
      begin
        logic ev; logic [W-1:0] ed;
        ev = hv.pop_front(); ed = hd.pop_front();
        checks++;
        if (ov !== ev || (ev && od !== ed)) begin
          failures++; $display("FAIL k=%0d ov=%b od=%h exp %b %h", k, ov, od, ev, ed);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
