// rref_accel_synth: RREF accelerator core over GF(127) with pivot reuse.
//
// Reduces a K x N generator matrix G to reduced row echelon form in place, the way
// the reference "RREF with pivot reuse" routine of the LESS signature scheme does,
// so that its results (G, is_pivot, updated was_pivot) are bit-identical to it.
//
// Structure: a control-unit FSM sequences four sub-blocks: the banked matrix
// memory g_mem (byte-addressed, 32-bit words, 1-cycle read latency), the four-lane
// arithmetic unit fq_arith_unit, the pivot vectors rref_pivot_regs and the
// row-operation registers rref_row_op_regs. Every row operation is an in-place
// read-modify-write stream over the memory, four elements per word, scheduled
// inside each FSM state by the micro-phase counter mem_phase:
//   row swap      6 cycles/word: read A, read B (A captured), B captured,
//                 write A into row B, write B into row A, advance
//   row scaling   3 cycles/word: read, wait, multiply by scaling_factor and write
//   multiplier    3 cycles/row : read pivot-column element, wait, capture
//   elimination   5 cycles/word: read row word, read pivot-row word (row word
//                 captured), wait, write row - multiplier*pivot, advance
// A single-element fetch takes 2 cycles (mem_phase 0,1) and is tested in the next
// state. Partial words at the end of a row are masked with g_wstrb.
//
// Flow: IDLE -(start)-> LOAD_INPUTS (G words on valid_in_G, was_pivot words on
// valid_in_WAS, in any interleaving) -> PREPROCESS_* (for each column
// K-1..0 marked in was_pivot, and only if pvt_reuse_limit != 0, the LAST row with
// a non-zero in that column is swapped into the row of the same index) ->
// for each pivot_step_row: PIVOT_* (search from the diagonal, column by column,
// downwards) -> HANDLE_PIVOT_REUSE (mark is_pivot, clear was_pivot[found row] and
// swap when the pivot is not on the diagonal, then reuse the pivot - skipping
// scaling and elimination - if was_pivot[col] && reused < pvt_reuse_limit &&
// col < K) -> SCALE_ROW_* -> REDUCE_* -> NEXT_PIVOT_ROW ... -> WAIT_FOR_READBACK
// (done_COMPUTE) -(start_READBACK)-> STREAM_OUTPUTS -> DONE -> IDLE. DONE lasts
// one cycle; start is accepted in IDLE only.
// If a column search runs past column N-1 the run stops with `error` set.
//
// Output streaming: G_out always shows the word at element g_cnt,
// was_pivot_column_out / is_pivot_column_out the word at was_cnt / is_cnt; a
// one-cycle read_G / read_WAS / read_IS means "taken", and the next word appears
// in the next cycle (one word per cycle sustained). done_G_OUT / done_WAS_OUT /
// done_IS_OUT rise when a stream is complete and stay high in DONE.
//
// Follows the described design: state names and order, the mem_phase cycle
// counts per word, the reuse test and the word-parallel in-place datapath. This
// design's choices: every one of the K rows gets a pivot (the last row too), the
// output handshake above, the found flag of the preprocessing row search, and
// sampling pvt_reuse_limit at start.
module rref_accel_synth
  import rref_accel_synth_pkg::*;
#(
  parameter int unsigned K = 126,
  parameter int unsigned N = 252
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // control
  input  logic        start,
  input  logic        start_READBACK,
  // input streams
  input  logic        valid_in_G,
  input  logic [31:0] G_in,
  input  logic        valid_in_WAS,
  input  logic [31:0] was_pivot_column_in,
  input  logic [31:0] pvt_reuse_limit,
  // output streams
  input  logic        read_G,
  input  logic        read_WAS,
  input  logic        read_IS,
  output logic [31:0] G_out,
  output logic [31:0] was_pivot_column_out,
  output logic [31:0] is_pivot_column_out,
  // status
  output logic        done_COMPUTE,
  output logic        done_G_OUT,
  output logic        done_WAS_OUT,
  output logic        done_IS_OUT,
  output logic        error
);

  localparam int unsigned G_ELEMS     = K * N;
  localparam int unsigned ROW_WORDS   = (N + 3) / 4;
  localparam int unsigned PIVOT_WORDS = (N + 31) / 32;
  localparam int unsigned AW  = $clog2(G_ELEMS + 4);          // byte address
  localparam int unsigned RW  = $clog2(K + 1);                // row index
  localparam int unsigned CW  = $clog2(N + 1);                // column index, wraps below 0 to >= N
  localparam int unsigned IW  = $clog2(N);                    // pivot-vector bit index
  localparam int unsigned PW  = $clog2(PIVOT_WORDS + 1);      // pivot word counter
  localparam int unsigned WW  = (PIVOT_WORDS > 1) ? $clog2(PIVOT_WORDS) : 1;
  localparam int unsigned XW  = $clog2(ROW_WORDS + 1);        // word_idx

  // ---------------------------------------------------------------- state
  cu_state_e      state;
  logic [2:0]     mem_phase;
  logic [AW-1:0]  g_cnt;
  logic [PW-1:0]  was_cnt, is_cnt;
  logic [CW-1:0]  preprocess_col_idx;
  logic [RW-1:0]  search_row_idx;
  logic           found_row;
  logic [RW-1:0]  active_pivot_row;
  logic [CW-1:0]  active_pivot_col;
  logic [RW-1:0]  pivot_step_row;
  logic [RW-1:0]  reduce_row_idx;
  logic [CW-1:0]  reduce_col_idx;
  logic [XW-1:0]  word_idx;
  logic [31:0]    pivot_reuse_counter;
  logic [31:0]    reuse_limit_q;
  logic           error_q;

  // ---------------------------------------------------------------- datapath nets
  logic          g_we;
  logic [3:0]    g_wstrb;
  logic [AW-1:0] g_addr;
  logic [31:0]   g_data_in, g_data_out;

  logic     ld_a, ld_b, ld_val, ld_scale, ld_mult;
  word_t    row_buffer_a, row_buffer_b, reduce_row_value_buffer;
  fq_elem_t scaling_factor, reduce_multiplier;
  fq_elem_t au_scalar, au_inv;
  word_t    au_mul, au_elim;

  logic          pv_clear, was_wr_en, was_clr_en, is_set_en, was_bit;
  logic [IW-1:0] was_rd_idx;

  // Byte address of element (r, c).
  function automatic logic [AW-1:0] idx_of(input int unsigned r, input int unsigned c);
    return AW'(r * N + c);
  endfunction

  // Byte strobes for a word starting at column c (lanes past column N-1 masked).
  function automatic logic [3:0] lane_mask(input int unsigned c);
    logic [3:0] m;
    for (int j = 0; j < 4; j++) m[j] = (c + j) < N;
    return m;
  endfunction

  // Elements covered by a word starting at column c.
  function automatic logic [CW-1:0] step_of(input int unsigned c);
    return CW'(((N - c) >= 4) ? 4 : (N - c));
  endfunction

  // Rows taking part in a swap: A is the destination (canonical) row.
  logic [RW-1:0] swap_row_a, swap_row_b;
  assign swap_row_a = (state == PREPROCESS_SWAP_ROWS) ? RW'(preprocess_col_idx) : pivot_step_row;
  assign swap_row_b = active_pivot_row;

  logic in_swap;     // a row swap is running in this state
  assign in_swap = (state == PREPROCESS_SWAP_ROWS && found_row &&
                    RW'(preprocess_col_idx) != active_pivot_row) ||
                   (state == HANDLE_PIVOT_REUSE && active_pivot_row != pivot_step_row);

  logic last_word;
  assign last_word = (word_idx == XW'(ROW_WORDS - 1));

  logic reuse_ok;
  assign reuse_ok = was_bit && (pivot_reuse_counter < reuse_limit_q) && (active_pivot_col < CW'(K));

  logic g_take;      // a G output word is consumed this cycle
  logic [AW-1:0] g_cnt_next;
  assign g_take     = (state == STREAM_OUTPUTS) && read_G && (g_cnt < AW'(G_ELEMS));
  assign g_cnt_next = g_take ? g_cnt + AW'(4) : g_cnt;

  // ---------------------------------------------------------------- memory port and loads
  always_comb begin
    g_we      = 1'b0;
    g_wstrb   = 4'b0000;
    g_addr    = '0;
    g_data_in = '0;
    ld_a = 1'b0; ld_b = 1'b0; ld_val = 1'b0; ld_scale = 1'b0; ld_mult = 1'b0;
    unique case (state)
      LOAD_INPUTS: begin
        g_addr    = g_cnt;
        g_we      = valid_in_G && (g_cnt < AW'(G_ELEMS));
        g_wstrb   = 4'b1111;
        g_data_in = G_in;
      end
      PREPROCESS_FETCH:
        g_addr = idx_of(32'(search_row_idx), 32'(preprocess_col_idx));
      PIVOT_FETCH:
        g_addr = idx_of(32'(active_pivot_row), 32'(active_pivot_col));
      PREPROCESS_SWAP_ROWS, HANDLE_PIVOT_REUSE: if (in_swap) begin
        unique case (mem_phase)
          3'd0:       g_addr = idx_of(32'(swap_row_a), 32'(4 * word_idx));
          3'd1: begin g_addr = idx_of(32'(swap_row_b), 32'(4 * word_idx)); ld_a = 1'b1; end
          3'd2: begin g_addr = idx_of(32'(swap_row_b), 32'(4 * word_idx)); ld_b = 1'b1; end
          3'd3: begin
            g_addr = idx_of(32'(swap_row_b), 32'(4 * word_idx)); g_we = 1'b1;
            g_wstrb = lane_mask(32'(4 * word_idx)); g_data_in = row_buffer_a;
          end
          3'd4: begin
            g_addr = idx_of(32'(swap_row_a), 32'(4 * word_idx)); g_we = 1'b1;
            g_wstrb = lane_mask(32'(4 * word_idx)); g_data_in = row_buffer_b;
          end
          default: ;
        endcase
      end
      SCALE_ROW_FETCH:
        g_addr = idx_of(32'(pivot_step_row), 32'(active_pivot_col));
      SCALE_ROW_INIT:
        ld_scale = 1'b1;
      SCALE_ROW_LOOP: begin
        g_addr = idx_of(32'(pivot_step_row), 32'(reduce_col_idx));
        if (mem_phase == 3'd2) begin
          g_we      = 1'b1;
          g_wstrb   = lane_mask(32'(reduce_col_idx));
          g_data_in = au_mul;
        end
      end
      REDUCE_ROW_LOOP: begin
        g_addr  = idx_of(32'(reduce_row_idx), 32'(active_pivot_col));
        ld_mult = (reduce_row_idx < RW'(K)) && (reduce_row_idx != pivot_step_row) &&
                  (mem_phase == 3'd2);
      end
      REDUCE_COL_LOOP: begin
        unique case (mem_phase)
          3'd0:       g_addr = idx_of(32'(reduce_row_idx), 32'(reduce_col_idx));
          3'd1: begin g_addr = idx_of(32'(pivot_step_row), 32'(reduce_col_idx)); ld_val = 1'b1; end
          3'd2:       g_addr = idx_of(32'(pivot_step_row), 32'(reduce_col_idx));
          3'd3: begin
            g_addr = idx_of(32'(reduce_row_idx), 32'(reduce_col_idx)); g_we = 1'b1;
            g_wstrb = lane_mask(32'(reduce_col_idx)); g_data_in = au_elim;
          end
          default: ;
        endcase
      end
      WAIT_FOR_READBACK: g_addr = '0;
      STREAM_OUTPUTS:    g_addr = g_cnt_next;
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- sub-blocks
  g_mem #(.K(K), .N(N)) u_g_mem (
    .clk_i      (clk_i),
    .g_we       (g_we),
    .g_wstrb    (g_wstrb),
    .g_addr     (g_addr),
    .g_data_in  (g_data_in),
    .g_data_out (g_data_out)
  );

  assign au_scalar = (state == SCALE_ROW_LOOP) ? scaling_factor : reduce_multiplier;

  fq_arith_unit u_au (
    .scalar    (au_scalar),
    .x_word    (reduce_row_value_buffer),
    .y_word    (g_data_out),
    .inv_in    (g_data_out[7:0]),
    .mul_word  (au_mul),
    .elim_word (au_elim),
    .inv_out   (au_inv)
  );

  rref_row_op_regs u_row_regs (
    .clk_i                   (clk_i),
    .rst_ni                  (rst_ni),
    .ld_a                    (ld_a),
    .ld_b                    (ld_b),
    .ld_val                  (ld_val),
    .word_in                 (g_data_out),
    .ld_scale                (ld_scale),
    .scale_in                (au_inv),
    .ld_mult                 (ld_mult),
    .mult_in                 (g_data_out[7:0]),
    .row_buffer_a            (row_buffer_a),
    .row_buffer_b            (row_buffer_b),
    .reduce_row_value_buffer (reduce_row_value_buffer),
    .scaling_factor          (scaling_factor),
    .reduce_multiplier       (reduce_multiplier)
  );

  assign pv_clear   = (state == IDLE) && start;
  assign was_wr_en  = (state == LOAD_INPUTS) && valid_in_WAS && (was_cnt < PW'(PIVOT_WORDS));
  assign was_clr_en = (state == HANDLE_PIVOT_REUSE) && (active_pivot_row != pivot_step_row);
  assign is_set_en  = (state == HANDLE_PIVOT_REUSE);
  assign was_rd_idx = (state == HANDLE_PIVOT_REUSE) ? IW'(active_pivot_col) : IW'(preprocess_col_idx);

  rref_pivot_regs #(.N(N)) u_pivot_regs (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .clear       (pv_clear),
    .was_wr_en   (was_wr_en),
    .was_wr_word (WW'(was_cnt)),
    .was_wr_data (was_pivot_column_in),
    .was_clr_en  (was_clr_en),
    .was_clr_idx (IW'(active_pivot_row)),
    .is_set_en   (is_set_en),
    .is_set_idx  (IW'(active_pivot_col)),
    .was_rd_idx  (was_rd_idx),
    .was_bit     (was_bit),
    .was_rd_word (WW'(was_cnt)),
    .was_word    (was_pivot_column_out),
    .is_rd_word  (WW'(is_cnt)),
    .is_word     (is_pivot_column_out)
  );

  assign G_out = g_data_out;

  // ---------------------------------------------------------------- FSM
  logic g_out_all, was_out_all, is_out_all;
  assign g_out_all   = g_cnt >= AW'(G_ELEMS);
  assign was_out_all = was_cnt == PW'(PIVOT_WORDS);
  assign is_out_all  = is_cnt == PW'(PIVOT_WORDS);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state               <= IDLE;
      mem_phase           <= '0;
      g_cnt               <= '0;
      was_cnt             <= '0;
      is_cnt              <= '0;
      preprocess_col_idx  <= '0;
      search_row_idx      <= '0;
      found_row           <= 1'b0;
      active_pivot_row    <= '0;
      active_pivot_col    <= '0;
      pivot_step_row      <= '0;
      reduce_row_idx      <= '0;
      reduce_col_idx      <= '0;
      word_idx            <= '0;
      pivot_reuse_counter <= '0;
      reuse_limit_q       <= '0;
      error_q             <= 1'b0;
    end else begin
      unique case (state)
        // ------------------------------------------------ input handling
        IDLE: if (start) begin
          state               <= LOAD_INPUTS;
          g_cnt               <= '0;
          was_cnt             <= '0;
          is_cnt              <= '0;
          mem_phase           <= '0;
          word_idx            <= '0;
          pivot_step_row      <= '0;
          pivot_reuse_counter <= '0;
          reuse_limit_q       <= pvt_reuse_limit;
          error_q             <= 1'b0;
        end
        LOAD_INPUTS: begin
          if (valid_in_G && g_cnt < AW'(G_ELEMS)) g_cnt <= g_cnt + AW'(4);
          if (was_wr_en) was_cnt <= was_cnt + 1'b1;
          if (g_out_all && was_out_all) state <= PREPROCESS_INIT;
        end
        // ------------------------------------------------ preprocessing
        PREPROCESS_INIT: begin
          preprocess_col_idx <= CW'(K - 1);
          state              <= PREPROCESS_SCAN_COL;
        end
        PREPROCESS_SCAN_COL: begin
          if (preprocess_col_idx >= CW'(N)) begin
            pivot_step_row      <= '0;
            pivot_reuse_counter <= '0;
            state               <= PIVOT_INIT;
          end else if (was_bit && reuse_limit_q != 32'd0) begin
            search_row_idx   <= '0;
            active_pivot_row <= '0;
            found_row        <= 1'b0;
            mem_phase        <= '0;
            state            <= PREPROCESS_FETCH;
          end else begin
            preprocess_col_idx <= preprocess_col_idx - 1'b1;
          end
        end
        PREPROCESS_FETCH: begin
          if (mem_phase == 3'd0) mem_phase <= 3'd1;
          else begin
            mem_phase <= '0;
            state     <= PREPROCESS_FIND_ROW;
          end
        end
        PREPROCESS_FIND_ROW: begin
          if (g_data_out[7:0] != 8'd0) begin
            active_pivot_row <= search_row_idx;
            found_row        <= 1'b1;
          end
          search_row_idx <= search_row_idx + 1'b1;
          if (search_row_idx + 1'b1 < RW'(K)) state <= PREPROCESS_FETCH;
          else begin
            state     <= PREPROCESS_SWAP_ROWS;
            mem_phase <= '0;
            word_idx  <= '0;
          end
        end
        PREPROCESS_SWAP_ROWS: begin
          if (!in_swap || mem_phase == 3'd6) begin
            mem_phase          <= '0;
            word_idx           <= '0;
            preprocess_col_idx <= preprocess_col_idx - 1'b1;
            state              <= PREPROCESS_SCAN_COL;
          end else if (mem_phase == 3'd5) begin
            word_idx  <= word_idx + 1'b1;
            mem_phase <= last_word ? 3'd6 : 3'd0;
          end else begin
            mem_phase <= mem_phase + 1'b1;
          end
        end
        // ------------------------------------------------ pivot discovery
        PIVOT_INIT: begin
          active_pivot_row <= pivot_step_row;
          active_pivot_col <= CW'(pivot_step_row);
          mem_phase        <= '0;
          state            <= PIVOT_FETCH;
        end
        PIVOT_FETCH: begin
          if (mem_phase == 3'd0) mem_phase <= 3'd1;
          else begin
            mem_phase <= '0;
            state     <= PIVOT_SEARCH_ROW;
          end
        end
        PIVOT_SEARCH_ROW: begin
          if (g_data_out[7:0] != 8'd0) begin
            mem_phase <= '0;
            word_idx  <= '0;
            state     <= HANDLE_PIVOT_REUSE;
          end else if (active_pivot_row < RW'(K - 1)) state <= PIVOT_NEXT_ROW;
          else state <= PIVOT_NEXT_COL;
        end
        PIVOT_NEXT_ROW: begin
          active_pivot_row <= active_pivot_row + 1'b1;
          state            <= PIVOT_FETCH;
        end
        PIVOT_NEXT_COL: begin
          if (active_pivot_col >= CW'(N - 1)) begin
            error_q <= 1'b1;
            state   <= WAIT_FOR_READBACK;
          end else begin
            active_pivot_col <= active_pivot_col + 1'b1;
            active_pivot_row <= pivot_step_row;
            state            <= PIVOT_FETCH;
          end
        end
        HANDLE_PIVOT_REUSE: begin
          if (in_swap) begin
            if (mem_phase == 3'd5) begin
              mem_phase <= '0;
              if (last_word) begin
                word_idx         <= '0;
                active_pivot_row <= pivot_step_row;   // pivot row now in place
              end else begin
                word_idx <= word_idx + 1'b1;
              end
            end else begin
              mem_phase <= mem_phase + 1'b1;
            end
          end else if (reuse_ok) begin
            pivot_reuse_counter <= pivot_reuse_counter + 1'b1;
            state               <= NEXT_PIVOT_ROW;
          end else begin
            mem_phase <= '0;
            state     <= SCALE_ROW_FETCH;
          end
        end
        // ------------------------------------------------ row normalisation
        SCALE_ROW_FETCH: begin
          if (mem_phase == 3'd0) mem_phase <= 3'd1;
          else begin
            mem_phase <= '0;
            state     <= SCALE_ROW_INIT;
          end
        end
        SCALE_ROW_INIT: begin
          reduce_col_idx <= active_pivot_col;
          mem_phase      <= '0;
          state          <= SCALE_ROW_LOOP;
        end
        SCALE_ROW_LOOP: begin
          if (mem_phase != 3'd2) mem_phase <= mem_phase + 1'b1;
          else begin
            mem_phase <= '0;
            if (reduce_col_idx + step_of(32'(reduce_col_idx)) >= CW'(N)) begin
              reduce_col_idx <= '0;
              state          <= REDUCE_ROW_INIT;
            end else begin
              reduce_col_idx <= reduce_col_idx + step_of(32'(reduce_col_idx));
            end
          end
        end
        // ------------------------------------------------ column elimination
        REDUCE_ROW_INIT: begin
          reduce_row_idx <= '0;
          mem_phase      <= '0;
          state          <= REDUCE_ROW_LOOP;
        end
        REDUCE_ROW_LOOP: begin
          if (reduce_row_idx >= RW'(K)) begin
            state <= NEXT_PIVOT_ROW;
          end else if (reduce_row_idx == pivot_step_row) begin
            reduce_row_idx <= reduce_row_idx + 1'b1;
          end else if (mem_phase != 3'd2) begin
            mem_phase <= mem_phase + 1'b1;
          end else begin
            mem_phase      <= '0;
            reduce_col_idx <= '0;
            state          <= REDUCE_COL_LOOP;
          end
        end
        REDUCE_COL_LOOP: begin
          if (mem_phase != 3'd4) mem_phase <= mem_phase + 1'b1;
          else begin
            mem_phase <= '0;
            if (reduce_col_idx + step_of(32'(reduce_col_idx)) >= CW'(N)) begin
              reduce_col_idx <= '0;
              reduce_row_idx <= reduce_row_idx + 1'b1;
              state          <= REDUCE_ROW_LOOP;
            end else begin
              reduce_col_idx <= reduce_col_idx + step_of(32'(reduce_col_idx));
            end
          end
        end
        NEXT_PIVOT_ROW: begin
          if (pivot_step_row < RW'(K - 1)) begin
            pivot_step_row <= pivot_step_row + 1'b1;
            state          <= PIVOT_INIT;
          end else begin
            state <= WAIT_FOR_READBACK;
          end
        end
        // ------------------------------------------------ output streaming
        WAIT_FOR_READBACK: if (start_READBACK) begin
          g_cnt   <= '0;
          was_cnt <= '0;
          is_cnt  <= '0;
          state   <= STREAM_OUTPUTS;
        end
        STREAM_OUTPUTS: begin
          g_cnt <= g_cnt_next;
          if (read_WAS && !was_out_all) was_cnt <= was_cnt + 1'b1;
          if (read_IS && !is_out_all)   is_cnt  <= is_cnt + 1'b1;
          if (g_out_all && was_out_all && is_out_all) state <= DONE;
        end
        DONE: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign done_COMPUTE = (state == WAIT_FOR_READBACK);
  assign done_G_OUT   = (state == DONE) || (state == STREAM_OUTPUTS && g_out_all);
  assign done_WAS_OUT = (state == DONE) || (state == STREAM_OUTPUTS && was_out_all);
  assign done_IS_OUT  = (state == DONE) || (state == STREAM_OUTPUTS && is_out_all);
  assign error        = error_q;

  // A row swap always exchanges two distinct rows inside the matrix.
  a_swap_rows_valid: assert property (@(posedge clk_i)
    in_swap |-> (swap_row_a < RW'(K)) && (swap_row_b < RW'(K)) && (swap_row_a != swap_row_b));
  // Scaling and elimination only happen with a pivot inside the matrix.
  a_pivot_in_range: assert property (@(posedge clk_i)
    (state == SCALE_ROW_LOOP || state == REDUCE_COL_LOOP) |->
      (active_pivot_col < CW'(N)) && (pivot_step_row < RW'(K)));

endmodule
