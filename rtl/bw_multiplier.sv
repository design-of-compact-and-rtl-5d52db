// Pipelined N x N Baugh-Wooley multiplier for two's complement and unsigned
// operands, built entirely from majority gates, inverters and one-bit full
// adders.
//
// How it works. pp_gen forms the N x N bit-product matrix; in signed mode the
// products that mix one sign bit with a non-sign bit are complemented, so all
// rows are non-negative and no sign extension is needed. Row 0 of the matrix
// is the initial sum vector. The initial carry vector is zero except for its
// top bit, which carries the Baugh-Wooley constant 2^N in signed mode. Rows
// 1..N-1 are added by N-1 carry-save rows (csa_row); each row finishes one
// low product bit. final_adder resolves the remaining sum/carry pair into
// p[2N-1:N] and adds the second constant, 2^(2N-1). In unsigned mode no
// product is complemented and both constants are 0, so the same array gives
// the unsigned product.
//
// Timing. A register stage follows every carry-save row and the final adder,
// so there is one clock between neighbouring rows and the longest path is one
// row (one full adder) or the N-cell ripple of the final adder. Latency is N
// clock cycles from in_valid to out_valid; a new operation may be issued on
// every cycle and there is no back-pressure. signed_mode travels down the
// pipeline with its operands, so the mode may change from one operation to
// the next. rst_n is synchronous and active low and clears the valid flags
// only; the data registers are not reset.
//
// The matrix, the carry-save array of full adders and the use of pipeline
// registers follow the Baugh-Wooley design this RTL renders; the register
// placement, the signed_mode input, the valid handshake and the reset are
// this design's own choices. N defaults to 4; larger words just add bit
// slices (the scheme is intended for words below 32 bits).
module bw_multiplier #(
  parameter int unsigned N = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             signed_mode,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic             out_valid,
  output logic [2*N-1:0]   p
);
  if (N < 2) begin : g_bad_n
    $error("bw_multiplier: N must be at least 2");
  end

  // State passed between carry-save rows.
  typedef struct packed {
    logic                valid;
    logic                tc;     // signed_mode of this operation
    logic [N-1:0][N-1:0] pp;     // bit-product matrix (rows not yet added)
    logic [N-1:0]        s;      // sum vector
    logic [N-1:0]        c;      // carry vector
    logic [N-1:0]        plo;    // finished low product bits
  } stage_t;

  logic [N-1:0][N-1:0] pp0;
  stage_t st0;                   // state entering row 1 (not registered)
  stage_t [N-1:1] st_in;         // state entering row k
  stage_t [N-1:1] st_d;          // state leaving row k
  stage_t [N-1:1] st_q;          // register after row k

  pp_gen #(.N(N)) u_pp (.a(a), .b(b), .signed_mode(signed_mode), .pp(pp0));

  always_comb begin
    st0       = '0;
    st0.valid = in_valid;
    st0.tc    = signed_mode;
    st0.pp    = pp0;
    st0.s     = pp0[0];
    st0.c     = {signed_mode, {(N-1){1'b0}}};   // constant 2^N
    st0.plo   = {{(N-1){1'b0}}, pp0[0][0]};
  end

  for (genvar k = 1; k < N; k++) begin : g_row
    logic [N-1:0] row_s, row_c;

    if (k == 1) begin : g_first
      assign st_in[k] = st0;
    end else begin : g_next
      assign st_in[k] = st_q[k-1];
    end

    csa_row #(.N(N)) u_row (
      .pp_row(st_in[k].pp[k]),
      .s_in  (st_in[k].s[N-1:1]),
      .c_in  (st_in[k].c),
      .s_out (row_s),
      .c_out (row_c)
    );

    always_comb begin
      st_d[k]        = st_in[k];
      st_d[k].s      = row_s;
      st_d[k].c      = row_c;
      st_d[k].plo[k] = row_s[0];
    end

    always_ff @(posedge clk) begin
      st_q[k] <= st_d[k];
      if (!rst_n) st_q[k].valid <= 1'b0;
    end
  end

  logic [N-1:0] p_hi;

  final_adder #(.N(N)) u_final (
    .s_in       (st_q[N-1].s[N-1:1]),
    .c_in       (st_q[N-1].c),
    .signed_mode(st_q[N-1].tc),
    .p_hi       (p_hi)
  );

  always_ff @(posedge clk) begin
    p         <= {p_hi, st_q[N-1].plo};
    out_valid <= rst_n && st_q[N-1].valid;
  end

  // Handshake rule: every accepted operation comes out exactly N cycles
  // later, and nothing comes out that was not put in.
  a_latency : assert property (@(posedge clk) disable iff (!rst_n)
                               in_valid |-> ##N out_valid);
  a_no_spurious : assert property (@(posedge clk) disable iff (!rst_n)
                                   out_valid |-> $past(in_valid, N));
endmodule
