// rkt_pkg: types, constants and the Hamming code functions shared by the
// RKT-switch router and its 4x4 mesh.
//
// Packet format (48 bits, field widths and bit positions as drawn in the
// node block diagram):
//   [47]    rev   - one flag bit. Its meaning is this design's choice: it is
//                   set by a router that sent the packet along a bypass
//                   (Y move before the X move was finished because the X
//                   neighbour was unavailable), so that the next router does
//                   not report that hop as a routing error.
//   [46:43] addr  - destination address, {y[1:0], x[1:0]} (split is this
//                   design's choice).
//   [42:30] code  - 13-bit Hamming codeword of the payload.
//   [29:22] data  - 8-bit payload (corrected copy after each decoder).
//   [21:0]  pad   - zero.
//
// Hamming code: 8 data bits in the classic (12,8) positions 1..12 with check
// bits at positions 1, 2, 4 and 8, plus one overall parity bit, giving single
// error correction and double error detection. The 13-bit word is laid out
// as {p8, p4, p2, p1, p0, d[7:0]}; for d = 8'hFF this gives 13'b0011011111111,
// the value the document's ECC simulation shows. The layout of the check
// bits and the use of the 13th bit as overall parity are this design's
// reading of that one printed value.
package rkt_pkg;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned CODE_W = 13;
  localparam int unsigned ADDR_W = 4;
  localparam int unsigned PKT_W  = 48;
  localparam int unsigned NPORTS = 5;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [CODE_W-1:0] code_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef struct packed {
    logic        rev;
    addr_t       addr;
    code_t       code;
    data_t       data;
    logic [21:0] pad;
  } pkt_t;

  // Router ports. Port P_L is the local resource; the others face the mesh.
  // North is towards y-1, South towards y+1, East towards x+1, West towards x-1.
  typedef enum logic [2:0] {
    P_L = 3'd0,
    P_N = 3'd1,
    P_E = 3'd2,
    P_S = 3'd3,
    P_W = 3'd4
  } port_e;

  typedef struct packed {
    data_t data;       // corrected payload
    code_t code;       // corrected codeword
    logic  corrected;  // a single-bit error was found and repaired
    logic  uncorr;     // a double-bit error was detected (data not trusted)
  } dec_t;

  function automatic code_t ham_encode(data_t d);
    logic p1, p2, p4, p8, p0;
    p1 = d[0] ^ d[1] ^ d[3] ^ d[4] ^ d[6];
    p2 = d[0] ^ d[2] ^ d[3] ^ d[5] ^ d[6];
    p4 = d[1] ^ d[2] ^ d[3] ^ d[7];
    p8 = d[4] ^ d[5] ^ d[6] ^ d[7];
    p0 = (^d) ^ p1 ^ p2 ^ p4 ^ p8;
    return {p8, p4, p2, p1, p0, d};
  endfunction

  // Bit of the 13-bit word that holds Hamming position pos (1..12).
  function automatic int unsigned ham_bit_of_pos(logic [3:0] pos);
    case (pos)
      4'd1:    return 9;   // p1
      4'd2:    return 10;  // p2
      4'd3:    return 0;   // d0
      4'd4:    return 11;  // p4
      4'd5:    return 1;   // d1
      4'd6:    return 2;   // d2
      4'd7:    return 3;   // d3
      4'd8:    return 12;  // p8
      4'd9:    return 4;   // d4
      4'd10:   return 5;   // d5
      4'd11:   return 6;   // d6
      default: return 7;   // 12: d7
    endcase
  endfunction

  function automatic dec_t ham_decode(code_t c);
    dec_t        r;
    data_t       d;
    logic [3:0]  syn;
    logic        par;
    code_t       fixed;
    d      = c[7:0];
    syn[0] = c[9]  ^ d[0] ^ d[1] ^ d[3] ^ d[4] ^ d[6];
    syn[1] = c[10] ^ d[0] ^ d[2] ^ d[3] ^ d[5] ^ d[6];
    syn[2] = c[11] ^ d[1] ^ d[2] ^ d[3] ^ d[7];
    syn[3] = c[12] ^ d[4] ^ d[5] ^ d[6] ^ d[7];
    par    = ^c;
    fixed  = c;
    r.corrected = 1'b0;
    r.uncorr    = 1'b0;
    if (par) begin
      // Odd number of flipped bits: assume one and repair it.
      if (syn == 4'd0) begin
        fixed[8]    = ~c[8];
        r.corrected = 1'b1;
      end else if (syn <= 4'd12) begin
        fixed[ham_bit_of_pos(syn)] = ~c[ham_bit_of_pos(syn)];
        r.corrected = 1'b1;
      end else begin
        r.uncorr = 1'b1;
      end
    end else if (syn != 4'd0) begin
      r.uncorr = 1'b1;
    end
    r.code = fixed;
    r.data = fixed[7:0];
    return r;
  endfunction

  function automatic logic [1:0] addr_x(addr_t a);
    return a[1:0];
  endfunction

  function automatic logic [1:0] addr_y(addr_t a);
    return a[3:2];
  endfunction

endpackage
