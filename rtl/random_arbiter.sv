// random_arbiter: grants one of N requests per clock, in a pseudo-random
// order, so that packets from the router's five directions are served
// randomly and none is starved.
//
// A 16-bit maximal-length LFSR (x^16 + x^14 + x^13 + x^11 + 1) steps every
// clock. Its low byte modulo N picks a starting request; the grant goes to
// the first active request at or after that start, going round. Any active
// request is therefore granted within a few clocks on average, and the
// order in which simultaneous requests are served is random. The document
// gives the function (five requests req_0..req_4, five grants, random
// service order); the LFSR and the rotating start are this design's choice.
//
// Interface: req[i] high asks for service; gnt is one-hot (or zero when no
// request is high) and combinational from req and the LFSR state.
// Timing: zero-latency grant; the random start changes every clock.
// rst (synchronous, active high) loads SEED into the LFSR.
module random_arbiter #(
  parameter int unsigned N    = 5,
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);

  logic [15:0] lfsr;
  logic [7:0]  start;

  always_ff @(posedge clk) begin
    if (rst) lfsr <= (SEED == 16'h0) ? 16'h1 : SEED;
    else     lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
  end

  always_comb start = 8'(lfsr[7:0] % 8'(N));

  always_comb begin
    int unsigned idx;
    logic        found;
    gnt   = '0;
    found = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = (32'(start) + k) % N;
      if (!found && req[idx]) begin
        gnt[idx] = 1'b1;
        found    = 1'b1;
      end
    end
  end

  // A grant is one-hot and only given to an active request.
  a_gnt_onehot : assert property (@(posedge clk) disable iff (rst) $onehot0(gnt));
  a_gnt_req    : assert property (@(posedge clk) disable iff (rst) (gnt & ~req) == '0);
  a_gnt_any    : assert property (@(posedge clk) disable iff (rst) (req != '0) |-> (gnt != '0));

endmodule
