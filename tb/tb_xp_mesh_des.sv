// tb_xp_mesh_des: the DES encryption benchmark mapped onto the 4x4 mesh at its
// default parameters. Eight processors (tiles 0-7) stream 8-beat write and
// read bursts to their private memories on their own tiles, and every 16th
// transaction goes to the shared memory, semaphore or interrupt device
// (tiles 8-10). Every read is checked against what was written. The bench
// reports the sustained data rate per processor and the network clock at
// which it would reach the benchmark's 180 MB/s per processor-memory flow.
module tb_xp_mesh_des;
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

  tb_xp_mesh_traffic #(.NT(NT), .COLS(4), .NTRANS(96), .MODE(1)) traffic (.*);

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
