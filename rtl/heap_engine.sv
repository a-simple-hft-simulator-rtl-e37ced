// heap_engine: one binary-heap priority queue (the bid max-heap or the ask
// min-heap of one symbol) kept in paged node memory.
//
// Operations:
//   insert - the new node goes to the next free slot and sifts up towards the
//            root. The engine keeps the moving node in a register and only
//            moves parents down into the hole it leaves, so each level costs
//            one parent read and one write instead of a two-read two-write
//            swap; the final order of the heap is the same.
//   pop    - the last node replaces the root and sifts down, each level
//            reading both children and moving the higher-priority one up.
//   edit   - a partial fill lowers the quantity of the root in place.
//   peek   - the root lives in a register (root_node), so the trade matcher
//            reads it with no memory access.
// Hazard logic inside the engine:
//   H1 speculative root forwarding: when an insert starts, the new node is
//      compared with root_node in the same cycle and replaces it if it would
//      become the root, before the sift-up has run.
//   H2 quantity shadow buffer: an edit whose write-back cannot issue at once
//      (the engine is busy) is held as {quantity, 13-bit heap index tag,
//      valid}; reads of the tagged index forward the new quantity until the
//      write-back commits.
//   H4 pop priority: a pop waits only for the operation already running; an
//      insert that arrives while a pop is requested or running is held in a
//      one-node input buffer and started when the pop has finished.
// Memory port: mem_req_valid/mem_req is held until mem_gnt; a read's data
// comes back later with mem_rvalid. One request is outstanding at a time.
// space_ok tells whether the page holding heap index `size` is mapped; an
// insert waits (page_fault) until it is.
// The hole-based sift, the order of priorities among buffered work (edit
// write-back, then pop, then insert) and the status outputs are this
// design's choices.
module heap_engine
  import hft_pkg::*;
#(
  parameter bit          IS_MAX = 1'b1,        // 1: bid max-heap, 0: ask min-heap
  parameter int unsigned SIZE_W = VADDR_W + 1  // holds 0..8192
) (
  input  logic              clk,
  input  logic              rst_n,
  // insert from dispatch
  input  logic              ins_valid,
  input  order_t            ins_node,
  output logic              ins_ready,
  // from the trade matcher
  input  logic              pop_req,
  input  logic              hold_ins,   // matching of this symbol not finished
  input  logic              edit_req,
  input  logic [QTY_W-1:0]  edit_qty,
  output logic              pop_done,
  output logic              edit_done,
  // root register (peek)
  output logic              root_valid,
  output order_t            root_node,
  // status
  output logic [SIZE_W-1:0] size,
  input  logic              space_ok,
  output logic              inserting,
  output logic              popping,
  output logic              page_fault,
  // hazard event pulses
  output logic              ev_spec_fwd,
  output logic              ev_shadow_fwd,
  output logic              ev_ins_buffered,
  // node memory port (heap index addresses)
  output logic              mem_req_valid,
  output mem_req_t          mem_req,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  order_t            mem_rdata
);

  typedef enum logic [3:0] {
    S_IDLE, S_I_RD, S_I_WAIT, S_WR,
    S_P_RDLAST, S_P_WAITLAST, S_P_RDL, S_P_WAITL, S_P_RDR, S_P_WAITR,
    S_E_WR
  } state_e;

  state_e              state;
  order_t              moving;       // node being sifted
  logic                mov_is_root;  // the sifting insert node is the root
  logic [VADDR_W-1:0]  hole;         // where `moving` would go
  logic [VADDR_W-1:0]  rd_addr;
  order_t              wr_other;     // parent/child node to move into the hole
  logic                wr_sel_mov;   // write `moving` (else wr_other)
  logic [VADDR_W-1:0]  wr_addr;
  logic                wr_last;      // this write ends the operation
  logic                is_pop;       // the operation in S_WR is a pop
  order_t              child;        // best child so far
  logic [VADDR_W-1:0]  child_idx;

  // H4 input buffer
  logic                buf_valid;
  order_t              buf_node;
  logic                pop_pending;

  // H2 quantity shadow buffer
  logic                sh_valid;
  logic [QTY_W-1:0]    sh_qty;
  logic [VADDR_W-1:0]  sh_tag;

  logic [SIZE_W-1:0]   size_q;
  assign size = size_q;

  // ---------------------------------------------------------------- helpers
  order_t rd_fwd;   // read data with the shadow quantity forwarded
  logic   rd_hit;
  always_comb begin
    rd_fwd = mem_rdata;
    rd_hit = sh_valid && (rd_addr == sh_tag);
    if (rd_hit) rd_fwd.qty = sh_qty;
  end

  logic [VADDR_W-1:0] parent_idx, left_idx, right_idx;
  assign parent_idx = (hole - 1'b1) >> 1;
  assign left_idx   = {hole[VADDR_W-2:0], 1'b1};
  assign right_idx  = left_idx + 1'b1;

  // child indexes computed one bit wider than the size (2*hole+2 can reach
  // 16384) so a child past the end of a full heap is never taken as present
  logic [SIZE_W:0] size_ext_l, size_ext_r, size_cmp;
  assign size_ext_l = {1'b0, hole, 1'b1};
  assign size_ext_r = size_ext_l + 1'b1;
  assign size_cmp   = {1'b0, size_q};

  logic idle_free;     // engine can start a new operation this cycle
  assign idle_free = (state == S_IDLE) && !edit_req && !sh_valid;

  logic start_pop, start_buf, start_direct;
  assign start_pop    = idle_free && (pop_pending || pop_req);
  assign start_buf    = idle_free && !start_pop && buf_valid && space_ok && !hold_ins;
  assign start_direct = idle_free && !pop_pending && !pop_req && !buf_valid &&
                        ins_valid && space_ok && !hold_ins;

  order_t ins_src;
  assign ins_src = start_buf ? buf_node : ins_node;
  logic spec_win;
  assign spec_win = !root_valid || node_beats(ins_src, root_node, IS_MAX);

  assign ins_ready = !buf_valid;

  // ------------------------------------------------------- memory requests
  always_comb begin
    mem_req_valid = 1'b0;
    mem_req       = '0;
    unique case (state)
      S_I_RD, S_P_RDLAST, S_P_RDR: begin
        mem_req_valid = 1'b1;
        mem_req.addr  = rd_addr;
      end
      S_P_RDL: begin
        mem_req_valid = (size_ext_l < size_cmp);
        mem_req.addr  = left_idx;
      end
      S_WR: begin
        mem_req_valid = 1'b1;
        mem_req.we    = 1'b1;
        mem_req.addr  = wr_addr;
        mem_req.wdata = wr_sel_mov ? moving : wr_other;
      end
      S_E_WR: begin
        mem_req_valid = 1'b1;
        mem_req.we    = 1'b1;
        mem_req.addr  = sh_tag;
        mem_req.wdata = root_node;
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------ main FSM
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      moving       <= '0;
      mov_is_root  <= 1'b0;
      hole         <= '0;
      rd_addr      <= '0;
      wr_other     <= '0;
      wr_sel_mov   <= 1'b0;
      wr_addr      <= '0;
      wr_last      <= 1'b0;
      is_pop       <= 1'b0;
      child        <= '0;
      child_idx    <= '0;
      buf_valid    <= 1'b0;
      buf_node     <= '0;
      pop_pending  <= 1'b0;
      sh_valid     <= 1'b0;
      sh_qty       <= '0;
      sh_tag       <= '0;
      size_q       <= '0;
      root_valid   <= 1'b0;
      root_node    <= '0;
      pop_done     <= 1'b0;
      edit_done    <= 1'b0;
      ev_spec_fwd  <= 1'b0;
      ev_shadow_fwd   <= 1'b0;
      ev_ins_buffered <= 1'b0;
    end else begin
      pop_done        <= 1'b0;
      edit_done       <= 1'b0;
      ev_spec_fwd     <= 1'b0;
      ev_shadow_fwd   <= 1'b0;
      ev_ins_buffered <= 1'b0;

      if (pop_req && !start_pop) pop_pending <= 1'b1;

      // ---- edit (partial fill) on the root
      if (edit_req) begin
        root_node.qty <= edit_qty;
        if (state inside {S_I_RD, S_I_WAIT, S_WR} && !is_pop && mov_is_root) begin
          // the root is the node still sifting up: edit it in its register
          moving.qty <= edit_qty;
          edit_done  <= 1'b1;
        end else begin
          sh_valid <= 1'b1;
          sh_qty   <= edit_qty;
          sh_tag   <= '0;
        end
      end

      // ---- insert arrivals that do not start at once go to the buffer
      if (ins_valid && ins_ready && !start_direct) begin
        buf_valid <= 1'b1;
        buf_node  <= ins_node;
        ev_ins_buffered <= pop_req || pop_pending || is_pop_state(state);
      end
      if (start_buf) buf_valid <= 1'b0;

      unique case (state)
        S_IDLE: begin
          if (sh_valid && !edit_req) begin
            state <= S_E_WR;
          end else if (start_pop) begin
            pop_pending <= 1'b0;
            is_pop      <= 1'b1;
            if (size_q == SIZE_W'(1)) begin
              size_q     <= '0;
              root_valid <= 1'b0;
              pop_done   <= 1'b1;
            end else begin
              rd_addr <= VADDR_W'(size_q - 1'b1);
              state   <= S_P_RDLAST;
            end
          end else if (start_buf || start_direct) begin
            is_pop      <= 1'b0;
            moving      <= ins_src;
            mov_is_root <= spec_win;
            hole        <= VADDR_W'(size_q);
            size_q      <= size_q + 1'b1;
            if (spec_win) begin
              root_node   <= ins_src;
              root_valid  <= 1'b1;
              ev_spec_fwd <= root_valid;
            end
            if (size_q == '0) begin
              wr_addr    <= '0;
              wr_sel_mov <= 1'b1;
              wr_last    <= 1'b1;
              state      <= S_WR;
            end else begin
              rd_addr <= (VADDR_W'(size_q) - 1'b1) >> 1;
              state   <= S_I_RD;
            end
          end
        end

        // ---------------------------------------------------------- insert
        S_I_RD: if (mem_gnt) state <= S_I_WAIT;

        S_I_WAIT: if (mem_rvalid) begin
          ev_shadow_fwd <= rd_hit;
          wr_addr <= hole;
          if (node_beats(moving, rd_fwd, IS_MAX)) begin
            wr_other   <= rd_fwd;
            wr_sel_mov <= 1'b0;
            wr_last    <= 1'b0;
            hole       <= rd_addr;
          end else begin
            wr_sel_mov <= 1'b1;
            wr_last    <= 1'b1;
          end
          state <= S_WR;
        end

        // ------------------------------------------- shared write stage
        S_WR: if (mem_gnt) begin
          if (is_pop && wr_addr == '0) root_node <= wr_sel_mov ? moving : wr_other;
          if (wr_last) begin
            state <= S_IDLE;
            if (is_pop) pop_done <= 1'b1;
          end else if (is_pop) begin
            state <= S_P_RDL;
          end else if (hole == '0) begin
            wr_addr    <= '0;
            wr_sel_mov <= 1'b1;
            wr_last    <= 1'b1;
          end else begin
            rd_addr <= parent_idx;
            state   <= S_I_RD;
          end
        end

        // ------------------------------------------------------------- pop
        S_P_RDLAST: if (mem_gnt) state <= S_P_WAITLAST;

        S_P_WAITLAST: if (mem_rvalid) begin
          moving <= rd_fwd;
          size_q <= size_q - 1'b1;
          hole   <= '0;
          state  <= S_P_RDL;
        end

        S_P_RDL: begin
          if (size_ext_l >= size_cmp) begin
            wr_addr    <= hole;
            wr_sel_mov <= 1'b1;
            wr_last    <= 1'b1;
            state      <= S_WR;
          end else if (mem_gnt) begin
            rd_addr <= left_idx;
            state   <= S_P_WAITL;
          end
        end

        S_P_WAITL: if (mem_rvalid) begin
          child     <= rd_fwd;
          child_idx <= left_idx;
          if (size_ext_r < size_cmp) begin
            rd_addr <= right_idx;
            state   <= S_P_RDR;
          end else begin
            wr_addr <= hole;
            if (node_beats(rd_fwd, moving, IS_MAX)) begin
              wr_other <= rd_fwd; wr_sel_mov <= 1'b0; wr_last <= 1'b0;
              hole <= left_idx;
            end else begin
              wr_sel_mov <= 1'b1; wr_last <= 1'b1;
            end
            state <= S_WR;
          end
        end

        S_P_RDR: if (mem_gnt) state <= S_P_WAITR;

        S_P_WAITR: if (mem_rvalid) begin
          wr_addr <= hole;
          if (node_beats(rd_fwd, child, IS_MAX)) begin
            if (node_beats(rd_fwd, moving, IS_MAX)) begin
              wr_other <= rd_fwd; wr_sel_mov <= 1'b0; wr_last <= 1'b0;
              hole <= right_idx;
            end else begin
              wr_sel_mov <= 1'b1; wr_last <= 1'b1;
            end
          end else begin
            if (node_beats(child, moving, IS_MAX)) begin
              wr_other <= child; wr_sel_mov <= 1'b0; wr_last <= 1'b0;
              hole <= child_idx;
            end else begin
              wr_sel_mov <= 1'b1; wr_last <= 1'b1;
            end
          end
          state <= S_WR;
        end

        // ------------------------------------------------ edit write-back
        S_E_WR: if (mem_gnt) begin
          sh_valid  <= 1'b0;
          edit_done <= 1'b1;
          state     <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase

    end
  end

  function automatic logic is_pop_state(input state_e s);
    return s inside {S_P_RDLAST, S_P_WAITLAST, S_P_RDL, S_P_WAITL, S_P_RDR,
                     S_P_WAITR} || (s == S_WR && is_pop);
  endfunction

  assign inserting  = buf_valid || (!is_pop && state inside {S_I_RD, S_I_WAIT, S_WR});
  assign popping    = pop_pending || is_pop_state(state);
  assign page_fault = buf_valid && !space_ok;

  // the matcher must not edit a heap whose root is being removed
  a_no_edit_in_pop: assert property (@(posedge clk) disable iff (!rst_n)
                                     edit_req |-> !popping);
  a_no_pop_empty:   assert property (@(posedge clk) disable iff (!rst_n)
                                     pop_req |-> root_valid);

endmodule
