// sts_column_gen: walks the columns of the LDPC parity-check matrix.
//
// The code is built from a Steiner triple system of order v = 6n+1 (v = 169
// for n = 28): every column of H has ones in exactly the three rows of one
// triple, so the column weight is 3, there are v checks, and every pair of
// checks shares exactly one column, which rules out 4-cycles. The triples are
// produced by Skolem's construction on Z_2n x Z_3 plus one point "inf":
//   type 0: {(x,0),(x,1),(x,2)}                     0 <= x < n
//   type 1: {inf, (x+n,i), (x,i+1)}                  0 <= x < n, i in Z_3
//   type 2: {(x,i),(y,i),(x o y,i+1)}                0 <= x < y < 2n, i in Z_3
// with the half-idempotent commutative quasigroup
//   x o y = s/2 for s = (x+y) mod 2n even, (s-1)/2 + n for s odd.
// That gives n + 3n + 3n(2n-1) = n(6n+1) triples (4732 for n = 28). Point
// (x,i) is check i*2n + x and "inf" is check 6n. The source article names a triple
// system of 169 points as the basis of its code; this particular construction
// and the column order are this design's choice.
//
// Interface: restart loads column 0; step advances to the next column (after
// the last it wraps to column 0). chk0..chk2 give the three checks of the
// current column combinationally; last is high on the final column.
module sts_column_gen #(
  parameter int STS_N = 28
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               restart,
  input  logic                               step,
  output logic [$clog2(6*STS_N+1)-1:0]       chk0,
  output logic [$clog2(6*STS_N+1)-1:0]       chk1,
  output logic [$clog2(6*STS_N+1)-1:0]       chk2,
  output logic                               last
);
  localparam int M2 = 2 * STS_N;
  localparam int PW = $clog2(6*STS_N+1);
  localparam int XW = $clog2(M2);

  typedef enum logic [1:0] {T_TRIV = 2'd0, T_INF = 2'd1, T_PAIR = 2'd2} ttype_e;

  ttype_e      typ;
  logic [XW-1:0] x, y;
  logic [1:0]    i;

  function automatic logic [PW-1:0] pt(input logic [XW-1:0] px, input logic [1:0] pi);
    return PW'(pi) * PW'(M2) + PW'(px);
  endfunction

  function automatic logic [1:0] inc3(input logic [1:0] v);
    return (v == 2'd2) ? 2'd0 : v + 2'd1;
  endfunction

  logic [XW:0]   s;
  logic [XW-1:0] o;
  always_comb begin
    s = (XW+1)'(x) + (XW+1)'(y);
    if (s >= (XW+1)'(M2)) s = s - (XW+1)'(M2);
    o = s[0] ? XW'((s - 1'b1) >> 1) + XW'(STS_N) : XW'(s >> 1);
    unique case (typ)
      T_TRIV: begin chk0 = pt(x, 2'd0); chk1 = pt(x, 2'd1); chk2 = pt(x, 2'd2); end
      T_INF:  begin chk0 = PW'(6*STS_N); chk1 = pt(x + XW'(STS_N), i); chk2 = pt(x, inc3(i)); end
      default: begin chk0 = pt(x, i); chk1 = pt(y, i); chk2 = pt(o, inc3(i)); end
    endcase
    last = (typ == T_PAIR) && (x == XW'(M2-2)) && (y == XW'(M2-1)) && (i == 2'd2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      typ <= T_TRIV; x <= '0; y <= '0; i <= '0;
    end else if (restart || (step && last)) begin
      typ <= T_TRIV; x <= '0; y <= '0; i <= '0;
    end else if (step) begin
      unique case (typ)
        T_TRIV:
          if (x == XW'(STS_N-1)) begin typ <= T_INF; x <= '0; i <= '0; end
          else x <= x + 1'b1;
        T_INF:
          if (i != 2'd2) i <= i + 2'd1;
          else if (x == XW'(STS_N-1)) begin typ <= T_PAIR; x <= '0; y <= XW'(1); i <= '0; end
          else begin x <= x + 1'b1; i <= '0; end
        default:
          if (i != 2'd2) i <= i + 2'd1;
          else if (y == XW'(M2-1)) begin x <= x + 1'b1; y <= x + XW'(2); i <= '0; end
          else begin y <= y + 1'b1; i <= '0; end
      endcase
    end
  end
endmodule
