// pp_sequencer: iteration controller of the iterative MAC.
//
// For one multiplication of an operand of (a_top+1) bytes by one of
// (b_top+1) bytes it visits the byte pairs (ia, ib) one per clock, in
// falling order of significance ia+ib, starting with the pair of upper
// bytes. Inside one significance level the pair with the larger A byte
// index goes first, so a 16x16-bit product runs A1*B1, A1*B0, A0*B1,
// A0*B0 and a 40x8-bit product runs A4*B0 .. A0*B0.
//
// Every cycle in which it is active it presents the current pair; the
// partial product of that pair is formed and tested against the
// threshold outside this block and the result comes back on "more". The
// current iteration is the last one ("last") when
//   - there is no pair left, or
//   - the mode is MODE_SINGLE, or
//   - the mode is MODE_THRESHOLD, more = 0, and the policy is CHECK_EACH
//     or this is the first iteration (CHECK_FIRST).
// A new operation can be started in the cycle that ends the old one, so
// back-to-back operations lose no cycle: an operation that needs k
// iterations occupies exactly k cycles.
//
// Interface: start loads a_top, b_top, mode, policy (ignored while an
// operation is running and not in its last cycle). active, ia, ib, level
// (= ia+ib), a_is_top / b_is_top (the byte is the operand's sign byte),
// first, last and iter (1-based count of the current iteration) describe
// the current cycle.
//
// Upper-byte-first order, the threshold test per partial product and the
// bound of all pairs follow the design. The order inside one significance
// level, the CHECK_FIRST option and the handshake are this design's own.
module pp_sequencer
  import imac_pkg::*;
#(
  parameter int unsigned A_BYTES = 5,
  parameter int unsigned B_BYTES = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IDX_W-1:0]  a_top,
  input  logic [IDX_W-1:0]  b_top,
  input  imac_mode_e        mode,
  input  check_policy_e     policy,
  input  logic              more,
  output logic              active,
  output logic [IDX_W-1:0]  ia,
  output logic [IDX_W-1:0]  ib,
  output logic [LVL_W-1:0]  level,
  output logic              a_is_top,
  output logic              b_is_top,
  output logic              first,
  output logic              last,
  output logic [ITER_W-1:0] iter
);

  logic [IDX_W-1:0] a_top_q, b_top_q;
  imac_mode_e       mode_q;
  check_policy_e    policy_q;
  logic [IDX_W-1:0] ia_nx, ib_nx;
  logic [LVL_W-1:0] lvl_nx;
  logic             no_next;
  logic             stop_thr;

  always_comb begin
    level    = LVL_W'(ia) + LVL_W'(ib);
    a_is_top = (ia == a_top_q);
    b_is_top = (ib == b_top_q);
    first    = (iter == ITER_W'(1));
    no_next  = (level == '0);
    stop_thr = (mode_q == MODE_THRESHOLD) && !more &&
               ((policy_q == CHECK_EACH) || first);
    last     = active && (no_next || (mode_q == MODE_SINGLE) || stop_thr);

    // Next pair: walk along the current level (A index down, B index up)
    // until either index hits its end, then open the next lower level
    // with the largest A index it allows.
    lvl_nx = level - LVL_W'(1);
    if (ia != '0 && ib != b_top_q) begin
      ia_nx = ia - IDX_W'(1);
      ib_nx = ib + IDX_W'(1);
    end else begin
      ia_nx = (lvl_nx > LVL_W'(a_top_q)) ? a_top_q : IDX_W'(lvl_nx);
      ib_nx = IDX_W'(lvl_nx - LVL_W'(ia_nx));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      ia       <= '0;
      ib       <= '0;
      iter     <= '0;
      a_top_q  <= '0;
      b_top_q  <= '0;
      mode_q   <= MODE_FULL;
      policy_q <= CHECK_EACH;
    end else if (start && (!active || last)) begin
      active   <= 1'b1;
      ia       <= a_top;
      ib       <= b_top;
      iter     <= ITER_W'(1);
      a_top_q  <= a_top;
      b_top_q  <= b_top;
      mode_q   <= mode;
      policy_q <= policy;
    end else if (active) begin
      if (last) begin
        active <= 1'b0;
      end else begin
        ia   <= ia_nx;
        ib   <= ib_nx;
        iter <= iter + ITER_W'(1);
      end
    end
  end

  // The byte indices never leave the operand.
  a_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    active |-> (ia <= a_top_q) && (ib <= b_top_q));
  // Never more iterations than byte pairs.
  iter_bound: assert property (@(posedge clk) disable iff (!rst_n)
    active |-> (iter <= (ITER_W'(a_top_q) + ITER_W'(1)) * (ITER_W'(b_top_q) + ITER_W'(1))));
  // The configured operand sizes fit the datapath.
  initial assert (A_BYTES >= 1 && A_BYTES <= 8 && B_BYTES >= 1 && B_BYTES <= 8)
    else $error("operands of 1 to 8 bytes are supported");
  cfg_fits: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (a_top < IDX_W'(A_BYTES)) && (b_top < IDX_W'(B_BYTES)));

endmodule
