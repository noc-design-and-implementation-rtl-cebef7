// tb_xp_mesh_full: the 4x4 mesh at its default configuration (single-cycle
// links, 6-flit buffers), all tiles running random write and read bursts at
// once with every read checked (see tb_xp_mesh_traffic). The first write from
// tile 0 to tile 15 crosses the idle mesh; its head flit must reach the target
// interface 7 cycles after leaving the initiator interface, one per switch.
module tb_xp_mesh_full;
  import xp_pkg::*;

  localparam int NT = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NT-1:0] ocp_en;
  ocp_req_t  init_req [NT];
  logic      init_cmd_accept [NT];
  ocp_resp_t init_resp [NT];
  logic      init_resp_accept [NT];
  ocp_req_t  tgt_req [NT];
  logic      tgt_cmd_accept [NT];
  ocp_resp_t tgt_resp [NT];
  logic      tgt_resp_accept [NT];
  logic [NT-1:0] ev_refuse, ev_contention, ev_retransmit;
  logic solo_done, done;
  int   checks, failures;

  xp_mesh dut (.*);

  tb_xp_mesh_traffic #(.NT(NT), .COLS(4), .NTRANS(60)) traffic (.*);

  int cyc = 0, t_out = -1, t_in = -1;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (t_out < 0 && dut.sw_in_fwd[0][P_INIT].valid && dut.sw_in_fwd[0][P_INIT].flit.head) t_out <= cyc;
    if (t_in < 0 && dut.sw_out_fwd[15][P_TGT].valid && dut.sw_out_fwd[15][P_TGT].flit.head) t_in <= cyc;
  end

  int extra_checks = 0, extra_fail = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (solo_done);
    extra_checks++;
    if (t_in - t_out != 7) begin
      extra_fail++;
      $display("FAIL: corner-to-corner head latency %0d cycles, expected 7", t_in - t_out);
    end
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_fail);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_fail + 1);
    $finish;
  end
endmodule
