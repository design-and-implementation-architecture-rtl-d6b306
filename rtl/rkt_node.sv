// rkt_node: one RKT-switch router of the mesh, with four mesh ports (North,
// East, South, West) and a local port for its resource.
//
// How it works, one packet per clock:
//   1. Every input has an in_buffer. The local input builds the 48-bit packet
//      from loc_addr_in and loc_data_in, the payload Hamming-encoded into the
//      code field by hamming_enc (combinational form). loc_err_in is XORed
//      into the codeword (and the payload copy) to model a faulty channel;
//      it is zero in normal use.
//   2. The random_arbiter picks one non-empty input; packet_select passes
//      its head packet on (the document's "sel" and "priority encoder").
//   3. xy_route chooses the output port (XY, with a bypass of an unavailable
//      x neighbour); route_err_detect checks whether the previous switch
//      routed the packet correctly; hamming_dec (combinational) corrects a
//      single flipped bit and writes the corrected codeword and payload back into
//      the packet.
//   4. If the chosen output can take the packet (downstream buffer not full;
//      the local output always can), the packet leaves and is popped from its
//      buffer. Otherwise it stays and the clock is a stall.
// The chain encoder -> packet -> selector -> XY routing -> decoder, the packet
// fields and the random arbiter follow the document's node diagram; buffering,
// handshake, the bypass and error checks' exact rules, the status pulses and
// the error-injection inputs are this design's choices.
//
// err_from[m] is set, and held until reset, when a routing error is found on
// a packet that came from neighbour m: this points at the faulty switch, as
// the document asks for its location to be determined so that it can be
// bypassed (declaring it unavailable is left to the system, through the
// neighbours' nbr_avail).
//
// Interface: mesh ports are arrays indexed 0..3 = N, E, S, W (router port
// number minus one). A packet moves on out_valid[m]; downstream accepts it
// that same clock because out_ready[m] (its buffer is not full) was already
// high. nbr_avail[m] low marks that neighbour missing or faulty.
// Timing: a packet spends at least one clock in each router's input buffer,
// so one hop takes one clock when there is no contention; delivery to the
// local output is combinational from the buffer head.
module rkt_node
  import rkt_pkg::*;
#(
  parameter logic [1:0]  X         = 2'd0,
  parameter logic [1:0]  Y         = 2'd0,
  parameter logic [15:0] SEED      = 16'hACE1,
  parameter int unsigned BUF_DEPTH = 2
) (
  input  logic       clk,
  input  logic       rst,
  // local resource, injection side
  input  logic       loc_valid_in,
  output logic       loc_ready,
  input  addr_t      loc_addr_in,
  input  data_t      loc_data_in,
  input  code_t      loc_err_in,
  // local resource, delivery side
  output logic       loc_valid_out,
  output data_t      loc_data_out,
  output logic       loc_corrected,
  output logic       loc_uncorr,
  // mesh ports, 0..3 = N, E, S, W
  input  logic [3:0] in_valid,
  output logic [3:0] in_ready,
  input  pkt_t       in_pkt [4],
  output logic [3:0] out_valid,
  input  logic [3:0] out_ready,
  output pkt_t       out_pkt [4],
  input  logic [3:0] nbr_avail,
  // fault injection into the routing logic
  input  logic       route_fault,
  // status pulses, one clock each
  output logic       route_err,
  // sticky: a routing error was seen on a packet from neighbour m (N, E, S, W)
  output logic [3:0] err_from,
  output logic       bypass_taken,
  output logic       stall,
  output logic       ecc_corrected,
  output logic       ecc_uncorr
);

  localparam addr_t CUR = {Y, X};

  pkt_t              buf_in   [NPORTS];
  logic [NPORTS-1:0] buf_wv;
  logic [NPORTS-1:0] buf_rdy;
  pkt_t              buf_head [NPORTS];
  logic [NPORTS-1:0] buf_valid;
  logic [NPORTS-1:0] pop;
  logic [NPORTS-1:0] gnt;

  pkt_t              sel_pkt;
  logic              sel_valid;
  logic [2:0]        sel_port;
  port_e             rt_port;
  logic              rt_bypass, rt_blocked, rt_err;
  data_t             dec_data;
  code_t             dec_code;
  logic              dec_corr, dec_unc;
  pkt_t              fwd_pkt;
  logic              tgt_ready, fire;

  // Local packet assembly (encoder stage of the node diagram).
  code_t loc_enc, loc_code;

  hamming_enc #(.REGISTERED(1'b0)) u_enc (
    .clk     (clk),
    .rst     (rst),
    .data_in (loc_data_in),
    .enc_out (loc_enc)
  );

  always_comb begin
    loc_code        = loc_enc ^ loc_err_in;
    buf_in[0].rev   = 1'b0;
    buf_in[0].addr  = loc_addr_in;
    buf_in[0].code  = loc_code;
    buf_in[0].data  = loc_code[7:0];
    buf_in[0].pad   = '0;
    buf_wv[0]       = loc_valid_in;
    loc_ready       = buf_rdy[0];
    for (int m = 0; m < 4; m++) begin
      buf_in[m+1] = in_pkt[m];
      buf_wv[m+1] = in_valid[m];
      in_ready[m] = buf_rdy[m+1];
    end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_buf
    in_buffer #(.T(pkt_t), .DEPTH(BUF_DEPTH)) u_buf (
      .clk       (clk),
      .rst       (rst),
      .in_valid  (buf_wv[p]),
      .in_ready  (buf_rdy[p]),
      .in_data   (buf_in[p]),
      .out_valid (buf_valid[p]),
      .out_data  (buf_head[p]),
      .pop       (pop[p])
    );
  end

  random_arbiter #(.N(NPORTS), .SEED(SEED)) u_arb (
    .clk (clk),
    .rst (rst),
    .req (buf_valid),
    .gnt (gnt)
  );

  packet_select #(.N(NPORTS)) u_sel (
    .pkt_in    (buf_head),
    .valid_in  (buf_valid),
    .gnt       (gnt),
    .pkt_out   (sel_pkt),
    .valid_out (sel_valid),
    .port_out  (sel_port)
  );

  xy_route u_route (
    .cur         (CUR),
    .dest        (sel_pkt.addr),
    .avail       ({nbr_avail, 1'b1}),
    .route_fault (route_fault),
    .port        (rt_port),
    .bypass      (rt_bypass),
    .blocked     (rt_blocked)
  );

  route_err_detect u_red (
    .cur     (CUR),
    .dest    (sel_pkt.addr),
    .rev     (sel_pkt.rev),
    .in_port (port_e'(sel_port)),
    .err     (rt_err)
  );

  hamming_dec #(.REGISTERED(1'b0)) u_dec (
    .clk           (clk),
    .rst           (rst),
    .code_in       (sel_pkt.code),
    .dec_out       (dec_data),
    .code_out      (dec_code),
    .dec_corrected (dec_corr),
    .dec_uncorr    (dec_unc)
  );

  always_comb begin
    fwd_pkt.rev  = rt_bypass;
    fwd_pkt.addr = sel_pkt.addr;
    fwd_pkt.code = dec_code;
    fwd_pkt.data = dec_data;
    fwd_pkt.pad  = '0;

    tgt_ready = (rt_port == P_L) ? 1'b1 : out_ready[2'(3'(rt_port) - 3'd1)];
    fire      = sel_valid && !rt_blocked && tgt_ready;
    pop       = fire ? gnt : '0;

    for (int m = 0; m < 4; m++) begin
      out_valid[m] = fire && (3'(rt_port) == 3'(m + 1));
      out_pkt[m]   = fwd_pkt;
    end

    loc_valid_out = fire && (rt_port == P_L);
    loc_data_out  = dec_data;
    loc_corrected = dec_corr;
    loc_uncorr    = dec_unc;

    route_err     = fire && rt_err;
    bypass_taken  = fire && rt_bypass;
    stall         = sel_valid && !fire;
    ecc_corrected = fire && dec_corr;
    ecc_uncorr    = fire && dec_unc;
  end

  // Locating the faulty switch: remember which neighbour sent a misrouted
  // packet, until reset.
  always_ff @(posedge clk) begin
    if (rst) err_from <= '0;
    else if (route_err && sel_port != 3'(P_L)) err_from[2'(sel_port - 3'd1)] <= 1'b1;
  end

  // A packet is only sent to a neighbour that is there and available.
  a_out_avail : assert property (@(posedge clk) disable iff (rst)
                                 (out_valid & ~nbr_avail) == '0);
  a_out_onehot : assert property (@(posedge clk) disable iff (rst)
                                  $onehot0({out_valid, loc_valid_out}));

endmodule
