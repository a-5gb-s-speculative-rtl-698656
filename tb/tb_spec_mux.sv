// tb_spec_mux: random speculative results for a run of frames. The reference
// walks the frame UI by UI, keeping the two most recent final bits (starting
// from 0, 0 after reset and carrying over frames only when frame_valid was
// high) and picks result {b[k-2], b[k-1]} of each UI. It also checks that
// all four selects occur.
module tb_spec_mux;
  import dfe_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, frame_valid = 1'b0;
  pdd_t       res       [1:N_UI][N_SPEC];
  logic       b         [1:N_UI];
  phase_t     phx       [1:N_UI];
  logic       phx_valid [1:N_UI];
  logic [1:0] sel       [1:N_UI];
  int         checks = 0, failures = 0;
  int         sel_seen [4];

  spec_mux dut (.*);

  always #1 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic p2, p1;
    foreach (res[k, u]) res[k][u] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    p2 = 1'b0; p1 = 1'b0;
    for (int f = 0; f < 2000; f++) begin
      @(negedge clk);
      foreach (res[k, u]) res[k][u] = pdd_t'($urandom);
      frame_valid = ($urandom % 4) != 0;
      #0.1;
      begin
        logic q2, q1;
        q2 = p2; q1 = p1;
        for (int k = 1; k <= N_UI; k++) begin
          pdd_t e;
          e = res[k][{q2, q1}];
          sel_seen[{q2, q1}]++;
          checks++;
          if (b[k] !== e.b || phx[k] !== e.phx || phx_valid[k] !== e.phx_valid) begin
            failures++;
            if (failures < 10) $display("frame %0d UI %0d: wrong result", f, k);
          end
          q2 = q1; q1 = e.b;
        end
        if (frame_valid) begin p2 = q2; p1 = q1; end
      end
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (sel_seen[s] == 0) begin failures++; $display("select %0d never used", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
