// tb_xp_link: self-checking test of the link with repeaters.
//
// Three links (no repeater, one, two) are driven with the same random forward
// and backward traffic. Each output must equal its input delayed by exactly
// the number of repeaters, in both directions, and reset must clear the valid
// and ACK/NACK bits of every stage.
module tb_xp_link;
  import xp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  link_fwd_t tx_fwd;
  link_bwd_t rx_bwd;
  link_fwd_t rx_fwd [3];
  link_bwd_t tx_bwd [3];

  xp_link #(.STAGES(0)) u0 (.clk, .rst_n, .tx_fwd, .tx_bwd(tx_bwd[0]), .rx_fwd(rx_fwd[0]), .rx_bwd);
  xp_link #(.STAGES(1)) u1 (.clk, .rst_n, .tx_fwd, .tx_bwd(tx_bwd[1]), .rx_fwd(rx_fwd[1]), .rx_bwd);
  xp_link #(.STAGES(2)) u2 (.clk, .rst_n, .tx_fwd, .tx_bwd(tx_bwd[2]), .rx_fwd(rx_fwd[2]), .rx_bwd);

  link_fwd_t hist_f [3];
  link_bwd_t hist_b [3];

  initial begin
    tx_fwd = '0; rx_bwd = '0;
    for (int k = 0; k < 3; k++) begin hist_f[k] = '0; hist_b[k] = '0; end
    repeat (2) @(negedge clk);
    // Reset state: nothing valid on either side of a pipelined link.
    tx_fwd = '1; rx_bwd = '1;
    @(negedge clk);
    checks++;
    if (rx_fwd[1].valid || rx_fwd[2].valid || tx_bwd[1].ack || tx_bwd[2].nack) begin
      failures++; $display("FAIL: stage not cleared by reset");
    end
    rst_n = 1;
    for (int c = 0; c < 200; c++) begin
      tx_fwd = link_fwd_t'({$urandom, $urandom});
      rx_bwd = link_bwd_t'($urandom_range(3));
      hist_f[0] = tx_fwd; hist_b[0] = rx_bwd;
      #1;
      for (int s = 0; s < 3; s++) begin
        if (c >= s) begin
          checks++;
          if (rx_fwd[s] !== hist_f[s] || tx_bwd[s] !== hist_b[s]) begin
            failures++;
            $display("FAIL: stages=%0d cycle %0d", s, c);
          end
        end
      end
      @(posedge clk);
      for (int s = 2; s > 0; s--) begin hist_f[s] = hist_f[s-1]; hist_b[s] = hist_b[s-1]; end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
