// logic_block: a logic cluster of N BLEs behind an interconnect matrix.
//
// I cluster inputs and the N BLE outputs (fed back inside the cluster) enter
// the interconnect matrix, which drives the K inputs of each of the N BLEs.
// The N BLE outputs are also the N cluster outputs. All BLEs share one clock.
// Defaults are the document's evaluated cluster: N = 4, K = 4, I = 2N+2 = 10,
// fully connected (100/100) matrix.
//
// run low holds every LUT output at 0 (see ble). A BLE in combinational
// mode whose output is fed back to its own inputs forms a combinational loop
// by configuration; lint reports the feedback path as circular for that
// reason, and a configuration must not close such a loop.
//
// Config layout (LSB first): interconnect matrix selects (N*K*SELW bits),
// then BLE b's 2^K+1 bits at IM_BITS + b*(2^K+1).
module logic_block
  import fpga_pkg::*;
#(
  parameter int unsigned I        = 10,
  parameter int unsigned N        = 4,
  parameter int unsigned K        = 4,
  parameter int unsigned IN_PCT   = 100,
  parameter int unsigned FB_PCT   = 100,
  parameter int unsigned SELW     = $clog2(I + N + 1),
  parameter int unsigned IM_BITS  = N * K * SELW,
  parameter int unsigned BLE_BITS = (1 << K) + 1,
  parameter int unsigned LB_BITS  = IM_BITS + N * BLE_BITS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  input  logic [LB_BITS-1:0] cfg,
  input  logic [I-1:0]       lb_in,
  output logic [N-1:0]       lb_out
);
  logic [N*K-1:0] ble_in;

  interconnect_matrix #(
    .I(I), .N(N), .K(K), .IN_PCT(IN_PCT), .FB_PCT(FB_PCT), .SELW(SELW)
  ) u_im (
    .lb_in (lb_in),
    .fb    (lb_out),
    .cfg   (cfg[IM_BITS-1:0]),
    .ble_in(ble_in)
  );

  for (genvar b = 0; b < N; b++) begin : g_ble
    ble #(.K(K)) u_ble (
      .clk  (clk),
      .rst_n(rst_n),
      .run  (run),
      .cfg  (cfg[IM_BITS + b*BLE_BITS +: BLE_BITS]),
      .in   (ble_in[b*K +: K]),
      .out  (lb_out[b])
    );
  end
endmodule
