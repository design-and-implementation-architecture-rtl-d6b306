// smart_reliable_noc: a MESH_X x MESH_Y mesh (4x4 by default) of rkt_node
// routers, the reliable network-on-chip built from RKT switches.
//
// Node i sits at x = i % MESH_X, y = i / MESH_X and has the 4-bit address
// {y[1:0], x[1:0]}; a packet injected anywhere with that address is
// delivered to node i's local output. Neighbours are joined by a pair of
// one-way links (a 48-bit packet, valid and ready each way). North is y-1.
// Links off the edge of the mesh are tied off.
//
// node_fault[i] marks node i unavailable: its neighbours stop sending to it
// (and bypass it where a second minimal direction exists) and ignore what it
// sends. route_fault[i] injects a fault into node i's routing logic, and
// err_in[i] flips bits of the codeword of packets injected at node i; both
// are for testing the error detection and correction and are zero in normal
// use. switch_suspect[i] rises, and stays until reset, once a neighbour of
// node i has received a misrouted packet from it: the located faulty switch.
//
// Beside the mesh sits the stand-alone ECC demonstrator ecc_8 with its own
// ports (ecc_*): it encodes, corrupts and corrects one 8-bit word, the
// same code the routers use.
//
// The 4x4 size, the 8-bit data and 4-bit address per node follow the
// document; the per-node status outputs, the fault inputs and the handshake
// are this design's. Each port array is indexed by node number.
// Timing: see rkt_node; a packet needs at least one clock per hop.
module smart_reliable_noc
  import rkt_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned BUF_DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  node_fault    [MESH_X*MESH_Y],
  input  logic  route_fault   [MESH_X*MESH_Y],
  input  logic  valid_in      [MESH_X*MESH_Y],
  output logic  ready_out     [MESH_X*MESH_Y],
  input  addr_t addr_in       [MESH_X*MESH_Y],
  input  data_t data_in       [MESH_X*MESH_Y],
  input  code_t err_in        [MESH_X*MESH_Y],
  output logic  valid_out     [MESH_X*MESH_Y],
  output data_t data_out      [MESH_X*MESH_Y],
  output logic  ecc_corrected [MESH_X*MESH_Y],
  output logic  ecc_uncorr    [MESH_X*MESH_Y],
  output logic  route_err     [MESH_X*MESH_Y],
  output logic  switch_suspect [MESH_X*MESH_Y],
  output logic  bypass_taken  [MESH_X*MESH_Y],
  output logic  stall         [MESH_X*MESH_Y],
  // stand-alone Hamming ECC demonstrator (ecc_8), beside the mesh
  input  data_t ecc_data_in,
  input  code_t ecc_error_in,
  output code_t ecc_enc_out,
  output code_t ecc_error_out,
  output data_t ecc_dec_out,
  output logic  ecc_dec_corrected,
  output logic  ecc_dec_uncorr
);

  localparam int unsigned NODES = MESH_X * MESH_Y;

  if (MESH_X < 1 || MESH_X > 4 || MESH_Y < 1 || MESH_Y > 4) begin : g_size_check
    $error("smart_reliable_noc: the 4-bit address allows at most a 4x4 mesh");
  end

  logic [3:0] n_in_valid  [NODES];
  logic [3:0] n_in_ready  [NODES];
  pkt_t       n_in_pkt    [NODES][4];
  logic [3:0] n_out_valid [NODES];
  logic [3:0] n_out_ready [NODES];
  pkt_t       n_out_pkt   [NODES][4];
  logic [3:0] n_avail     [NODES];
  logic [3:0] n_err_from  [NODES];
  logic       n_corr      [NODES];
  logic       n_unc       [NODES];

  for (genvar i = 0; i < NODES; i++) begin : g_node
    localparam int unsigned X = i % MESH_X;
    localparam int unsigned Y = i / MESH_X;
    // Neighbour index for mesh port m = 0..3 (N, E, S, W), and whether it exists.
    localparam bit HAS_N = (Y > 0);
    localparam bit HAS_E = (X < MESH_X - 1);
    localparam bit HAS_S = (Y < MESH_Y - 1);
    localparam bit HAS_W = (X > 0);
    localparam int unsigned NB_N = HAS_N ? i - MESH_X : i;
    localparam int unsigned NB_E = HAS_E ? i + 1      : i;
    localparam int unsigned NB_S = HAS_S ? i + MESH_X : i;
    localparam int unsigned NB_W = HAS_W ? i - 1      : i;

    // A packet arriving on port m was sent on the neighbour's opposite port.
    always_comb begin
      n_in_valid[i][0]  = HAS_N && n_out_valid[NB_N][2] && !node_fault[NB_N];
      n_in_valid[i][1]  = HAS_E && n_out_valid[NB_E][3] && !node_fault[NB_E];
      n_in_valid[i][2]  = HAS_S && n_out_valid[NB_S][0] && !node_fault[NB_S];
      n_in_valid[i][3]  = HAS_W && n_out_valid[NB_W][1] && !node_fault[NB_W];
      n_in_pkt[i][0]    = n_out_pkt[NB_N][2];
      n_in_pkt[i][1]    = n_out_pkt[NB_E][3];
      n_in_pkt[i][2]    = n_out_pkt[NB_S][0];
      n_in_pkt[i][3]    = n_out_pkt[NB_W][1];
      n_out_ready[i][0] = HAS_N && n_in_ready[NB_N][2];
      n_out_ready[i][1] = HAS_E && n_in_ready[NB_E][3];
      n_out_ready[i][2] = HAS_S && n_in_ready[NB_S][0];
      n_out_ready[i][3] = HAS_W && n_in_ready[NB_W][1];
      n_avail[i][0]     = HAS_N && !node_fault[NB_N];
      n_avail[i][1]     = HAS_E && !node_fault[NB_E];
      n_avail[i][2]     = HAS_S && !node_fault[NB_S];
      n_avail[i][3]     = HAS_W && !node_fault[NB_W];
    end

    rkt_node #(
      .X         (2'(X)),
      .Y         (2'(Y)),
      .SEED      (16'hACE1 ^ 16'(i * 16'h1F35)),
      .BUF_DEPTH (BUF_DEPTH)
    ) u_node (
      .clk           (clk),
      .rst           (rst),
      .loc_valid_in  (valid_in[i]),
      .loc_ready     (ready_out[i]),
      .loc_addr_in   (addr_in[i]),
      .loc_data_in   (data_in[i]),
      .loc_err_in    (err_in[i]),
      .loc_valid_out (valid_out[i]),
      .loc_data_out  (data_out[i]),
      .loc_corrected (),
      .loc_uncorr    (),
      .in_valid      (n_in_valid[i]),
      .in_ready      (n_in_ready[i]),
      .in_pkt        (n_in_pkt[i]),
      .out_valid     (n_out_valid[i]),
      .out_ready     (n_out_ready[i]),
      .out_pkt       (n_out_pkt[i]),
      .nbr_avail     (n_avail[i]),
      .route_fault   (route_fault[i]),
      .route_err     (route_err[i]),
      .err_from      (n_err_from[i]),
      .bypass_taken  (bypass_taken[i]),
      .stall         (stall[i]),
      .ecc_corrected (n_corr[i]),
      .ecc_uncorr    (n_unc[i])
    );

    // Error flags: any packet this router forwarded or delivered. A node is
    // suspect when a neighbour has caught it making a routing error.
    always_comb begin
      switch_suspect[i] = (HAS_N && n_err_from[NB_N][2]) || (HAS_E && n_err_from[NB_E][3]) ||
                          (HAS_S && n_err_from[NB_S][0]) || (HAS_W && n_err_from[NB_W][1]);
      ecc_corrected[i] = n_corr[i];
      ecc_uncorr[i]    = n_unc[i];
    end
  end

  ecc_8 u_ecc_8 (
    .clk           (clk),
    .rst           (rst),
    .data_in       (ecc_data_in),
    .error_in      (ecc_error_in),
    .enc_out       (ecc_enc_out),
    .error_out     (ecc_error_out),
    .dec_out       (ecc_dec_out),
    .dec_corrected (ecc_dec_corrected),
    .dec_uncorr    (ecc_dec_uncorr)
  );

endmodule
