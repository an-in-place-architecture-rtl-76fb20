// dbf_controller: schedule sequencer of the in-place deblocking filter.
//
// A macroblock is processed as luma (4x4 blocks, n = 4) followed by Cb and
// Cr (n = 2 each). Every component runs the same sequence of four-cycle
// phases; cycle c of a phase handles line c of an edge, slot c of the
// transpose buffer and word c of an SRAM block slot:
//
//   P0..P(n-1)  load the n blocks above the macroblock row by row through the
//               transpose buffer; each is written to SRAM slot k in column
//               order one phase later.
//   L           load the first left-neighbour block into the shift buffer
//               (and move the last upper block into SRAM).
//   per block row g = 1..n:
//     V0 V1 H0 V2 H1 .. V(n-1) H(n-2) S H(n-1)
//     Vj  vertical edge left of block j: left side from the shift buffer,
//         right side from the input port. Right result goes back into the
//         shift buffer, left result into the transpose buffer.
//     Hj  horizontal edge above block j: upper side from SRAM slot j, lower
//         side from the transpose buffer (columns). Lower result is written
//         back to SRAM slot j in place, upper result to the transpose buffer.
//     S   move the last block of the row from the shift buffer into the
//         transpose buffer while the next row's left block is loaded.
//   F0..Fn      move the bottom block row from SRAM out through the transpose
//               buffer.
//
// The transpose buffer reads out, in every phase, what the previous phase
// wrote into it; the word read goes to the output port, to SRAM or to the
// filter. Its direction flips at every phase except V1, where the left
// neighbour block just written as rows is sent out again as rows.
// The last phase Fn only reads; when another component or macroblock
// follows, its P0 (which only writes) runs in the same phase. A component
// thus takes 2n^2+3n+1 phases when chained: 45 for luma and 15 per chroma
// component, i.e. 300 cycles per macroblock back to back, and 304 for a
// macroblock that starts from idle.
//
// Interface: start_i requests a macroblock; one request can be held while
// busy. ctrl_o is the control word of the current cycle, cyc_o the cycle in
// the phase, tb_dir_o the transpose-buffer direction. The SRAM read port is
// driven one cycle ahead from the next cycle's control word, so that read
// data arrives in the cycle it is used. mb_start_o marks the first cycle of
// a macroblock, mb_done_o its last.
module dbf_controller
  import dbf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start_i,
  output logic       busy_o,
  output ctrl_t      ctrl_o,
  output logic [1:0] cyc_o,
  output logic       tb_dir_o,
  output logic       sram_rd_o,
  output logic [3:0] sram_raddr_o,
  output logic       mb_start_o,
  output logic       mb_done_o
);

  typedef struct packed {
    logic       busy;
    comp_e      comp;
    logic [5:0] p;      // phase within the component
    logic [1:0] c;      // cycle within the phase
    logic       merge;  // last phase is shared with P0 of the next component
  } state_t;

  state_t st, st_n;
  logic   pend, tb_dir;
  logic   take_start;   // the pending or incoming request is consumed now

  function automatic int unsigned blocks_of(comp_e comp);
    return (comp == COMP_Y) ? 4 : 2;
  endfunction

  function automatic logic [5:0] last_phase(comp_e comp);
    int unsigned n = blocks_of(comp);
    return 6'(2 * n * n + 3 * n + 1);
  endfunction

  function automatic comp_e next_comp(comp_e comp);
    case (comp)
      COMP_Y:  return COMP_CB;
      COMP_CB: return COMP_CR;
      default: return COMP_Y;
    endcase
  endfunction

  // Control word of phase p of component comp (without merging).
  function automatic ctrl_t decode(comp_e comp, logic [5:0] p);
    ctrl_t d;
    int unsigned n, w, q, g, qq, j, k;
    n = blocks_of(comp);
    w = n + 1;
    d = '0;
    d.in_comp   = comp;
    d.edge_comp = comp;
    d.out_comp  = comp;
    d.tb_toggle = 1'b1;
    if (int'(p) < int'(n)) begin
      // Pk: upper block k+1 enters the transpose buffer, block k goes to SRAM.
      k = int'(p);
      d.in_en  = 1'b1;
      d.in_blk = 5'(k + 1);
      d.tb_wr  = 1'b1;
      d.tb_src = TB_FROM_IN;
      d.tb_toggle = (k != 0);
      if (k != 0) begin
        d.sram_wr    = 1'b1;
        d.sram_wslot = 2'(k - 1);
      end
    end else if (int'(p) == int'(n)) begin
      // L: first left block into the shift buffer, last upper block to SRAM.
      d.in_en     = 1'b1;
      d.in_blk    = 5'(w);
      d.in_to_sr  = 1'b1;
      d.sr_shift  = 1'b1;
      d.sram_wr   = 1'b1;
      d.sram_wslot = 2'(n - 1);
    end else if (int'(p) < int'(n + 1 + n * (2 * n + 1))) begin
      q  = int'(p) - (n + 1);
      g  = q / (2 * n + 1) + 1;
      qq = q % (2 * n + 1);
      if (qq == 2 * n - 1) begin
        // S: last block of the row from shift buffer to transpose buffer.
        d.sr_shift = 1'b1;
        d.in_to_sr = 1'b1;
        if (g < n) begin
          d.in_en  = 1'b1;
          d.in_blk = 5'((g + 1) * w);
        end
        d.tb_wr   = 1'b1;
        d.tb_src  = TB_FROM_SR;
        d.out_en  = 1'b1;
        d.out_blk = 5'((g - 1) * w + n - 1);
      end else if (qq == 0 || qq == 1 || (qq % 2 == 1)) begin
        // Vj: vertical edge between blocks (g, j) and (g, j+1).
        j = (qq == 0) ? 0 : (qq + 1) / 2;
        d.in_en        = 1'b1;
        d.in_blk       = 5'(g * w + j + 1);
        d.filt_en      = 1'b1;
        d.filt_horz    = 1'b0;
        d.edge_x       = 2'(j);
        d.edge_y       = 2'(g - 1);
        d.edge_no      = 5'((g - 1) * 2 * n + ((j == 0) ? 0 : 2 * j - 1));
        d.sr_shift     = 1'b1;
        d.sr_from_filt = 1'b1;
        d.tb_wr        = 1'b1;
        d.tb_src       = TB_FROM_FILT;
        d.tb_toggle    = (j != 1);
        if (j == 0) begin
          d.out_en  = (g >= 2);
          d.out_blk = 5'((g - 2) * w + n);
        end else if (j == 1) begin
          d.out_en  = 1'b1;
          d.out_blk = 5'(g * w);
        end else begin
          d.out_en  = 1'b1;
          d.out_blk = 5'((g - 1) * w + j - 1);
        end
      end else begin
        // Hj: horizontal edge between blocks (g-1, j+1) and (g, j+1).
        j = (qq == 2 * n) ? n - 1 : (qq - 2) / 2;
        d.filt_en        = 1'b1;
        d.filt_horz      = 1'b1;
        d.edge_x         = 2'(j);
        d.edge_y         = 2'(g - 1);
        d.edge_no        = 5'((g - 1) * 2 * n + ((j == n - 1) ? 2 * n - 1 : 2 * j + 2));
        d.sram_rd        = 1'b1;
        d.sram_rslot     = 2'(j);
        d.sram_wr        = 1'b1;
        d.sram_wslot     = 2'(j);
        d.sram_from_filt = 1'b1;
        d.tb_wr          = 1'b1;
        d.tb_src         = TB_FROM_FILT;
      end
    end else begin
      // Fk: bottom block row leaves through the transpose buffer.
      k = int'(p) - (n + 1 + n * (2 * n + 1));
      d.out_en  = 1'b1;
      d.out_blk = (k == 0) ? 5'((n - 1) * w + n) : 5'(n * w + k);
      if (k < n) begin
        d.sram_rd    = 1'b1;
        d.sram_rslot = 2'(k);
        d.tb_wr      = 1'b1;
        d.tb_src     = TB_FROM_SRAM;
      end
    end
    return d;
  endfunction

  // Control word of a state, including a merged final phase.
  function automatic ctrl_t ctrl_of(state_t s);
    ctrl_t d, p0;
    d = decode(s.comp, s.p);
    if (s.merge) begin
      p0 = decode(next_comp(s.comp), 6'd0);
      d.in_en   = p0.in_en;
      d.in_comp = p0.in_comp;
      d.in_blk  = p0.in_blk;
      d.tb_wr   = p0.tb_wr;
      d.tb_src  = p0.tb_src;
    end
    if (!s.busy) d = '0;
    return d;
  endfunction

  // Next state.
  always_comb begin
    st_n = st;
    take_start = 1'b0;
    if (!st.busy) begin
      if (start_i || pend) begin
        take_start = 1'b1;
        st_n.busy  = 1'b1;
        st_n.comp  = COMP_Y;
        st_n.p     = '0;
        st_n.c     = '0;
        st_n.merge = 1'b0;
      end
    end else begin
      st_n.c = st.c + 2'd1;
      if (st.c == 2'd3) begin
        if (st.p == last_phase(st.comp)) begin
          if (st.merge) begin
            st_n.comp  = next_comp(st.comp);
            st_n.p     = 6'd1;
            st_n.merge = 1'b0;
          end else begin
            st_n.busy = 1'b0;
          end
        end else begin
          st_n.p = st.p + 6'd1;
          if (st.p + 6'd1 == last_phase(st.comp)) begin
            if (st.comp != COMP_CR) begin
              st_n.merge = 1'b1;
            end else if (start_i || pend) begin
              st_n.merge = 1'b1;
              take_start = 1'b1;
            end
          end
        end
      end
    end
  end

  ctrl_t ctrl_n;
  assign ctrl_n = ctrl_of(st_n);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= '0;
      pend   <= 1'b0;
      tb_dir <= 1'b0;
    end else begin
      st <= st_n;
      if (take_start)   pend <= 1'b0;
      else if (start_i) pend <= 1'b1;
      if (st.busy && st.c == 2'd3 && st_n.busy && ctrl_n.tb_toggle)
        tb_dir <= !tb_dir;
    end
  end

  assign busy_o       = st.busy;
  assign ctrl_o       = ctrl_of(st);
  assign cyc_o        = st.c;
  assign tb_dir_o     = tb_dir;
  assign sram_rd_o    = ctrl_n.sram_rd;
  assign sram_raddr_o = {ctrl_n.sram_rslot, st_n.c};
  assign mb_start_o   = st.busy && st.c == 2'd0 &&
                        ((st.comp == COMP_Y && st.p == 6'd0) ||
                         (st.comp == COMP_CR && st.merge));
  assign mb_done_o    = st.busy && st.c == 2'd3 && st.comp == COMP_CR &&
                        st.p == last_phase(COMP_CR);

  // A phase never writes SRAM at the word it is about to read next cycle.
  property no_sram_collision;
    @(posedge clk) disable iff (!rst_n)
      (ctrl_o.sram_wr && sram_rd_o) |-> ({ctrl_o.sram_wslot, st.c} != sram_raddr_o);
  endproperty
  assert property (no_sram_collision);

endmodule
