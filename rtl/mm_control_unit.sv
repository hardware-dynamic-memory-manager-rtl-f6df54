// mm_control_unit: instruction decoder and sequencer of the worst-fit memory
// manager.
//
// A finite-state machine of fifteen states (mm_pkg::state_e) executes the
// four coprocessor instructions. It keeps one header word at the start of
// every block of the managed memory and keeps every free block in the max
// queue as the item {id = address + 1, value = size in words}, so the queue's
// top item is always the largest free block (worst fit).
//
// Header word (this implementation's layout; the document does not give one):
//   [2*A_W+1]      free        block is free
//   [2*A_W]        prev_free   the block just before this one is free
//   [2*A_W-1:A_W]  prev_addr   address of the block just before this one
//   [A_W-1:0]      size        block size in words, header included
//                              (0 encodes 2^A_W, the whole memory)
// Upper bits, if D_W > 2*A_W+2, are written as zero. Port 1 only ever
// writes headers, so p1_wdata bits above the header are constant zero by
// design (14 bits at the default widths); the memory keeps the full width
// because port 0 also stores user data.
// Unused header bits: some captured headers are only read in part (e.g. the
// size of the previous block is never needed), which lint reports as unused
// bits; the registers are kept whole for readability.
//
// Instructions (enable=1 while ready=1; data_in = {address, data}):
//   MALLOC  data field = number of words wanted n (block = n+1 words with
//           its header). The largest free block is taken; if it is exactly
//           n+1 words it is allocated whole, otherwise it is split and the
//           rest stays free. data_out = header address of the block, with
//           valid, 1 cycle after issue (no split) or 2 cycles (split).
//           error is raised instead if n = 0 or no free block is big enough.
//   FREE    address field = header address of the block. It is freed and
//           merged with a free block before and/or after it. error is raised
//           one cycle after issue if the block is already free.
//   WRITE   address field, data field: one-cycle memory write.
//   READ    address field: data_out/valid one cycle later.
// Cycles from issue until ready again: WRITE 1, READ 2, MALLOC 2 (no split)
// or 4 (split), FREE 4 (no merge), 6 (one merge) or 8 (two merges); the FREE
// and MALLOC paths follow the document's state diagram state by state.
//
// Queue rule kept by the sequencing: a remove is never issued in the cycle
// after another queue instruction; an insert may be.
// Memory: two synchronous ports (see mm_memory); port 0 serves reads and
// writes of the instruction's own block, port 1 the neighbour's header.
module mm_control_unit
  import mm_pkg::*;
#(
  parameter int  A_W   = 8,
  parameter int  D_W   = 32,
  localparam int SZ_W  = A_W + 1,          // sizes 1 .. 2^A_W
  localparam int ID_W  = A_W + 1,
  localparam int IW    = ID_W + SZ_W
) (
  input  logic               clk,
  input  logic               rst,
  // coprocessor interface
  input  logic               enable,
  input  logic [1:0]         instr,
  input  logic [D_W+A_W-1:0] data_in,
  output logic               ready,
  output logic               valid,
  output logic               error,
  output logic [D_W-1:0]     data_out,
  // max queue
  output logic               q_add,
  output logic [IW-1:0]      q_item,
  input  logic [IW-1:0]      q_top,
  // memory port 0
  output logic               p0_en,
  output logic               p0_we,
  output logic [A_W-1:0]     p0_addr,
  output logic [D_W-1:0]     p0_wdata,
  input  logic [D_W-1:0]     p0_rdata,
  // memory port 1
  output logic               p1_en,
  output logic               p1_we,
  output logic [A_W-1:0]     p1_addr,
  output logic [D_W-1:0]     p1_wdata,
  input  logic [D_W-1:0]     p1_rdata
);

  if (D_W < 2 * A_W + 2) begin : g_check
    $error("mm_control_unit: D_W must be at least 2*A_W+2 to hold a header");
  end

  typedef struct packed {
    logic           free;
    logic           prev_free;
    logic [A_W-1:0] prev_addr;
    logic [A_W-1:0] size;
  } hdr_t;

  localparam int HW = $bits(hdr_t);
  localparam logic [SZ_W-1:0] MEM_WORDS = SZ_W'(1) << A_W;

  function automatic hdr_t to_hdr(input logic [D_W-1:0] w);
    return hdr_t'(w[HW-1:0]);
  endfunction
  function automatic logic [D_W-1:0] to_word(input hdr_t h);
    return D_W'(h);
  endfunction
  function automatic logic [SZ_W-1:0] dec_size(input logic [A_W-1:0] f);
    return (f == '0) ? MEM_WORDS : SZ_W'(f);
  endfunction
  function automatic hdr_t mk_hdr(input logic fr, input logic pf,
                                  input logic [A_W-1:0] pa, input logic [SZ_W-1:0] sz);
    hdr_t h;
    h.free      = fr;
    h.prev_free = pf;
    h.prev_addr = pa;
    h.size      = sz[A_W-1:0];
    return h;
  endfunction

  state_e state, state_d;

  // operands and headers captured along an instruction
  logic [A_W-1:0]  blk_q;        // MALLOC: chosen block; FREE: freed block
  logic [SZ_W-1:0] tsize_q;      // MALLOC: size of the largest free block
  logic            tvalid_q;     // MALLOC: queue was not empty
  logic [D_W-1:0]  req_q;        // MALLOC: requested words
  hdr_t            hA_q, hN_q, hP_q;
  logic [A_W-1:0]  merge_addr_q;
  logic [SZ_W-1:0] merge_size_q;
  logic            fix_q;
  logic [A_W-1:0]  fix_addr_q;
  hdr_t            fix_hdr_q;

  // instruction fields
  logic [A_W-1:0]  in_addr;
  logic [D_W-1:0]  in_data;
  assign in_addr = data_in[D_W +: A_W];
  assign in_data = data_in[D_W-1:0];

  // queue top as a free block
  logic [ID_W-1:0] top_id;
  logic [SZ_W-1:0] top_size;
  logic [A_W-1:0]  top_addr;
  assign top_id   = q_top[IW-1 -: ID_W];
  assign top_size = q_top[SZ_W-1:0];
  assign top_addr = A_W'(top_id - 1'b1);

  // derived quantities (wide enough not to wrap)
  logic [D_W:0]    need;        // MALLOC block size incl. header
  hdr_t            h0, h1;      // live read data
  logic [SZ_W-1:0] szA, szN, szP;
  logic [SZ_W:0]   n_end, nn_end;
  logic            n_ex, nn_ex;
  logic [A_W-1:0]  n_addr, nn_addr;

  assign h0     = to_hdr(p0_rdata);
  assign h1     = to_hdr(p1_rdata);
  assign need   = {1'b0, req_q} + 1'b1;
  assign szA    = dec_size(hA_q.size);
  assign szP    = SZ_W'(blk_q - hA_q.prev_addr);
  assign n_end  = {1'b0, blk_q} + {1'b0, szA};
  assign n_ex   = n_end < {1'b0, MEM_WORDS};
  assign n_addr = n_end[A_W-1:0];

  always_comb begin
    state_d  = state;
    ready    = 1'b0;
    valid    = 1'b0;
    error    = 1'b0;
    data_out = '0;
    q_add    = 1'b0;
    q_item   = '0;
    p0_en = 1'b0; p0_we = 1'b0; p0_addr = '0; p0_wdata = '0;
    p1_en = 1'b0; p1_we = 1'b0; p1_addr = '0; p1_wdata = '0;
    szN     = dec_size(hN_q.size);
    nn_end  = '0;
    nn_ex   = 1'b0;
    nn_addr = '0;

    unique case (state)
      S_RESET: begin
        // one free block covering the whole memory
        if (!rst) begin
          p0_en = 1'b1; p0_we = 1'b1; p0_addr = '0;
          p0_wdata = to_word(mk_hdr(1'b1, 1'b0, '0, MEM_WORDS));
          q_add  = 1'b1;
          q_item = {ID_W'(1), MEM_WORDS};
          state_d = S_READY;
        end
      end

      S_READY: begin
        ready = 1'b1;
        if (enable) begin
          unique case (instr_e'(instr))
            I_WRITE: begin
              p0_en = 1'b1; p0_we = 1'b1; p0_addr = in_addr; p0_wdata = in_data;
            end
            I_READ: begin
              p0_en = 1'b1; p0_addr = in_addr;
              state_d = S_MEM_READ;
            end
            I_MALLOC: begin
              // fetch the header of the largest block and of its successor
              p0_en = 1'b1; p0_addr = top_addr;
              p1_en = ({1'b0, top_addr} + {1'b0, top_size}) < {1'b0, MEM_WORDS};
              p1_addr = top_addr + top_size[A_W-1:0];
              state_d = S_MALLOC;
            end
            I_FREE: begin
              p0_en = 1'b1; p0_addr = in_addr;
              state_d = S_FREE_BEGIN;
            end
            default: ;
          endcase
        end
      end

      S_MEM_READ: begin
        valid    = 1'b1;
        data_out = p0_rdata;
        state_d  = S_READY;
      end

      S_MALLOC: begin
        if (!tvalid_q || req_q == '0 || need > (D_W+1)'(tsize_q)) begin
          error   = 1'b1;
          state_d = S_READY;
        end else if (need == (D_W+1)'(tsize_q)) begin
          // exact fit: allocate the block whole
          p0_en = 1'b1; p0_we = 1'b1; p0_addr = blk_q;
          p0_wdata = to_word(mk_hdr(1'b0, h0.prev_free, h0.prev_addr, tsize_q));
          p1_en = ({1'b0, blk_q} + {1'b0, tsize_q}) < {1'b0, MEM_WORDS};
          p1_we = 1'b1; p1_addr = blk_q + tsize_q[A_W-1:0];
          p1_wdata = to_word(mk_hdr(h1.free, 1'b0, h1.prev_addr, dec_size(h1.size)));
          q_add  = 1'b0;
          q_item = {ID_W'(blk_q) + 1'b1, tsize_q};
          valid    = 1'b1;
          data_out = D_W'(blk_q);
          state_d  = S_READY;
        end else begin
          // split: the front part is allocated
          p0_en = 1'b1; p0_we = 1'b1; p0_addr = blk_q;
          p0_wdata = to_word(mk_hdr(1'b0, h0.prev_free, h0.prev_addr, SZ_W'(need)));
          q_add  = 1'b0;
          q_item = {ID_W'(blk_q) + 1'b1, tsize_q};
          state_d = S_MALLOC_BIGGER;
        end
      end

      S_MALLOC_BIGGER: begin
        // the remainder becomes a new free block after the allocated one
        p0_en = 1'b1; p0_we = 1'b1; p0_addr = blk_q + A_W'(need);
        p0_wdata = to_word(mk_hdr(1'b1, 1'b0, blk_q, tsize_q - SZ_W'(need)));
        p1_en = n_ex; p1_we = 1'b1; p1_addr = n_addr;
        p1_wdata = to_word(mk_hdr(hN_q.free, hN_q.prev_free, blk_q + A_W'(need),
                                  dec_size(hN_q.size)));
        q_add  = 1'b1;
        q_item = {ID_W'(blk_q + A_W'(need)) + 1'b1, tsize_q - SZ_W'(need)};
        valid    = 1'b1;
        data_out = D_W'(blk_q);
        state_d  = S_WAIT;
      end

      S_WAIT: state_d = S_READY;

      S_FREE_BEGIN: begin
        // hA arrives now (hA_q is loaded with it at the clock edge)
        if (h0.free) begin
          error   = 1'b1;
          state_d = S_READY;
        end else begin
          p0_en   = ({1'b0, blk_q} + {1'b0, dec_size(h0.size)}) < {1'b0, MEM_WORDS};
          p0_addr = blk_q + h0.size;
          p1_en   = h0.prev_free;
          p1_addr = h0.prev_addr;
          state_d = h0.prev_free ? S_FREE_PREV_EMPTY : S_FREE_PREV_USED;
        end
      end

      S_FREE_PREV_USED: begin
        szN     = dec_size(h0.size);
        nn_end  = {1'b0, n_addr} + {1'b0, szN};
        nn_ex   = nn_end < {1'b0, MEM_WORDS};
        nn_addr = nn_end[A_W-1:0];
        if (n_ex && h0.free) begin
          p0_en = nn_ex; p0_addr = nn_addr;
          state_d = S_FREE_POSTFIX_MERGE;
        end else begin
          // no merge: mark free, tell the successor, queue the block
          p0_en = 1'b1; p0_we = 1'b1; p0_addr = blk_q;
          p0_wdata = to_word(mk_hdr(1'b1, hA_q.prev_free, hA_q.prev_addr, szA));
          p1_en = n_ex; p1_we = 1'b1; p1_addr = n_addr;
          p1_wdata = to_word(mk_hdr(h0.free, 1'b1, h0.prev_addr, dec_size(h0.size)));
          q_add  = 1'b1;
          q_item = {ID_W'(blk_q) + 1'b1, szA};
          state_d = S_WAIT;
        end
      end

      S_FREE_POSTFIX_MERGE: begin
        // drop the next block from the queue and grow this one over it
        q_add  = 1'b0;
        q_item = {ID_W'(n_addr) + 1'b1, szN};
        p0_en = 1'b1; p0_we = 1'b1; p0_addr = blk_q;
        p0_wdata = to_word(mk_hdr(1'b1, hA_q.prev_free, hA_q.prev_addr, szA + szN));
        state_d = S_FREE_END;
      end

      S_FREE_PREV_EMPTY: begin
        // the previous block leaves the queue; it will absorb this one
        q_add  = 1'b0;
        q_item = {ID_W'(hA_q.prev_addr) + 1'b1, szP};
        szN     = dec_size(h0.size);
        nn_end  = {1'b0, n_addr} + {1'b0, szN};
        nn_ex   = nn_end < {1'b0, MEM_WORDS};
        nn_addr = nn_end[A_W-1:0];
        if (n_ex && h0.free) begin
          p0_en = nn_ex; p0_addr = nn_addr;
          state_d = S_FREE_MERGES_1;
        end else begin
          p0_en = 1'b1; p0_we = 1'b1; p0_addr = hA_q.prev_addr;
          p0_wdata = to_word(mk_hdr(1'b1, h1.prev_free, h1.prev_addr, szP + szA));
          p1_en = n_ex; p1_we = 1'b1; p1_addr = n_addr;
          p1_wdata = to_word(mk_hdr(h0.free, 1'b1, hA_q.prev_addr, dec_size(h0.size)));
          state_d = S_FREE_PREFIX_MERGE;
        end
      end

      S_FREE_PREFIX_MERGE: begin
        // stale header inside the merged block is marked free
        p0_en = 1'b1; p0_we = 1'b1; p0_addr = blk_q;
        p0_wdata = to_word(mk_hdr(1'b1, hA_q.prev_free, hA_q.prev_addr, szA));
        state_d = S_FREE_END;
      end

      S_FREE_MERGES_1: begin
        nn_end  = {1'b0, n_addr} + {1'b0, szN};
        nn_ex   = nn_end < {1'b0, MEM_WORDS};
        nn_addr = nn_end[A_W-1:0];
        p0_en = 1'b1; p0_we = 1'b1; p0_addr = hA_q.prev_addr;
        p0_wdata = to_word(mk_hdr(1'b1, hP_q.prev_free, hP_q.prev_addr, szP + szA + szN));
        p1_en = nn_ex; p1_we = 1'b1; p1_addr = nn_addr;
        p1_wdata = to_word(mk_hdr(h0.free, 1'b1, hA_q.prev_addr, dec_size(h0.size)));
        state_d = S_FREE_MERGES_2;
      end

      S_FREE_MERGES_2: begin
        q_add  = 1'b0;
        q_item = {ID_W'(n_addr) + 1'b1, szN};
        p0_en = 1'b1; p0_we = 1'b1; p0_addr = blk_q;
        p0_wdata = to_word(mk_hdr(1'b1, hA_q.prev_free, hA_q.prev_addr, szA));
        state_d = S_FREE_MERGES_3;
      end

      S_FREE_MERGES_3: state_d = S_FREE_END;

      S_FREE_END: begin
        q_add  = 1'b1;
        q_item = {ID_W'(merge_addr_q) + 1'b1, merge_size_q};
        p1_en = fix_q; p1_we = 1'b1; p1_addr = fix_addr_q;
        p1_wdata = to_word(fix_hdr_q);
        state_d = S_WAIT;
      end

      default: state_d = S_RESET;
    endcase
  end

  // capture registers
  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_RESET;
      blk_q        <= '0;
      tsize_q      <= '0;
      tvalid_q     <= 1'b0;
      req_q        <= '0;
      hA_q         <= '0;
      hN_q         <= '0;
      hP_q         <= '0;
      merge_addr_q <= '0;
      merge_size_q <= '0;
      fix_q        <= 1'b0;
      fix_addr_q   <= '0;
      fix_hdr_q    <= '0;
    end else begin
      state <= state_d;
      unique case (state)
        S_READY: begin
          if (enable && instr_e'(instr) == I_MALLOC) begin
            blk_q    <= top_addr;
            tsize_q  <= top_size;
            tvalid_q <= (top_id != '0);
            req_q    <= in_data;
          end else begin
            blk_q    <= in_addr;
          end
        end
        S_MALLOC: begin
          hN_q <= h1;
          hA_q <= mk_hdr(h0.free, h0.prev_free, h0.prev_addr, tsize_q);
        end
        S_FREE_BEGIN: hA_q <= h0;
        S_FREE_PREV_USED: begin
          hN_q <= h0;
          // postfix merge result and the header after it to be fixed
          merge_addr_q <= blk_q;
          merge_size_q <= szA + dec_size(h0.size);
        end
        S_FREE_POSTFIX_MERGE: begin
          fix_q      <= ({1'b0, n_addr} + {1'b0, szN}) < {1'b0, MEM_WORDS};
          fix_addr_q <= n_addr + szN[A_W-1:0];
          fix_hdr_q  <= mk_hdr(h0.free, 1'b1, blk_q, dec_size(h0.size));
        end
        S_FREE_PREV_EMPTY: begin
          hN_q         <= h0;
          hP_q         <= h1;
          merge_addr_q <= hA_q.prev_addr;
          merge_size_q <= szP + szA;
          fix_q        <= 1'b0;
        end
        S_FREE_MERGES_1: merge_size_q <= szP + szA + szN;
        default: ;
      endcase
    end
  end

  // a result and an error are never reported together
  a_valid_xor_error: assert property (@(posedge clk) disable iff (rst)
    !(valid && error));

endmodule
