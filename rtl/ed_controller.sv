// ed_controller: runs one edit-distance problem through the worker chain.
//
// The host sets the registers (mode, string lengths m and n, tile width D,
// word addresses of S, T, the cost row and the two column arrays) and pulses
// start. The cost row (n+1 words) must hold the first row of the cost matrix
// and, for tiling, column array 0 (m+1 words) its first column; after done
// the row holds the last row, so M[m][n] is at row_base + n (also on score).
//
// The matrix is processed in segments: W consecutive rows (a strip) over a
// range of columns. Strip mining uses one range, columns 0..n; tiling walks
// column strips of width D left to right and, inside each, strips top to
// bottom. For every segment the controller
//   1. selects where the sink puts the last worker's row (memory for the last
//      strip and for MODE_STRIP_MEM, scratchpad otherwise) and pulses
//      seg_start;
//   2. asks the feeder for one header per worker: S[i] (and, tiling, the
//      seeds col_in[i] and col_in[i-1]); rows past m get bypass headers, so S
//      need not be padded;
//   3. asks for T[j] and the top value of each column: from memory for the
//      first strip, otherwise from the scratchpad (tiling, both; strip mining
//      with scratchpad, the tops) or memory (strip mining with memory). In
//      the first strip of a column strip the top of the last column is also
//      copied to col_out[0] (the corner), the diagonal seed of row 1 for the
//      next column strip;
//   4. waits until the sink has stored the whole row, every worker is idle
//      and every write has been accepted: the end-of-strip synchronisation.
// Worker edge outputs go to col_out[i]; col_in and col_out swap after each
// column strip.
//
// A configuration the scratchpad cannot hold (strip mining with scratchpad
// and n+1 > SP_WORDS, tiling with D > SP_WORDS/2, or m or n of 0) is refused:
// done rises at once with cfg_error set. The schedules are the document's;
// the register set, the header scheme and the bypass rows are this design's.
module ed_controller
  import ed_pkg::*;
#(
  parameter int unsigned W        = 14,
  parameter int unsigned SP_WORDS = 2048
) (
  input  logic      clk,
  input  logic      rst_n,
  // host registers
  input  logic      start,
  input  mode_e     mode,
  input  idx_t      m,
  input  idx_t      n,
  input  idx_t      tile_d,
  input  addr_t     s_base,
  input  addr_t     t_base,
  input  addr_t     row_base,
  input  addr_t     col_base0,
  input  addr_t     col_base1,
  output logic      busy,
  output logic      done,
  output logic      cfg_error,
  // feeder requests
  output logic      req_valid,
  input  logic      req_ready,
  output feed_req_t req_data,
  // sink configuration
  output logic      seg_start,
  output logic      sink_to_mem,
  output addr_t     sink_mem_base,
  output logic      sink_t_store,
  // column array written by edges and the corner
  output addr_t     col_out_base,
  // progress
  input  logic      seg_done,
  input  logic      array_idle,
  input  logic      feeder_idle
);
  localparam addr_t       TOFF = addr_t'(SP_WORDS / 2);

  typedef enum logic [2:0] {C_IDLE, C_SEG, C_HDR, C_COLS, C_WAIT, C_DONE} cstate_e;
  cstate_e st;

  mode_e r_mode;
  idx_t  r_m, r_n, r_d;
  addr_t r_s, r_t, r_row, r_c0, r_c1;
  idx_t  row0;          // first row of the current strip
  idx_t  j0, j_end, j;  // column range of the segment, current column
  logic  first_seg;     // first strip of the column strip
  logic  cpar;          // column strip parity (col array select)
  int unsigned k;       // worker index in the header phase
  logic [1:0] hs;       // header sub-step
  logic  ts;            // 0: T[j], 1: top

  logic  tiled, last_seg;
  idx_t  i_row;
  addr_t col_in_base;

  assign tiled        = (r_mode == MODE_TILED);
  assign last_seg     = (32'(row0) + W) > 32'(r_m);
  assign i_row        = row0 + idx_t'(k);
  assign col_in_base  = cpar ? r_c1 : r_c0;
  assign col_out_base = cpar ? r_c0 : r_c1;
  assign busy         = (st != C_IDLE) && (st != C_DONE);

  // request for the current step
  always_comb begin
    req_valid = 1'b0;
    req_data  = '{src: SRC_NONE, kind: K_BYP, last: 1'b0, corner: 1'b0, seeded: 1'b0,
                  row: i_row, col: j0, addr: '0};
    if (st == C_HDR) begin
      req_valid = 1'b1;
      if (i_row > r_m) begin
        req_data.kind = K_BYP;
      end else if (tiled && hs == 2'd0) begin
        req_data.src  = SRC_MEM;
        req_data.kind = K_LEFT;
        req_data.addr = col_in_base + addr_t'(i_row);
      end else if (tiled && hs == 2'd1) begin
        req_data.src  = SRC_MEM;
        req_data.kind = K_DIAG;
        req_data.addr = col_in_base + addr_t'(i_row) - 1;
      end else begin
        req_data.src    = SRC_MEM;
        req_data.kind   = K_S;
        req_data.seeded = tiled;
        req_data.addr   = r_s + addr_t'(i_row) - 1;
      end
    end else if (st == C_COLS) begin
      req_valid     = 1'b1;
      req_data.last = (j == j_end);
      if (!ts) begin
        req_data.kind = K_T;
        if (tiled && !first_seg) begin
          req_data.src  = SRC_SP;
          req_data.addr = TOFF + addr_t'(idx_t'(j - j0));
        end else begin
          req_data.src  = SRC_MEM;
          req_data.addr = r_t + addr_t'(j) - 1;
        end
      end else begin
        req_data.kind   = K_TOP;
        req_data.corner = tiled && first_seg && (j == j_end);
        if (first_seg || r_mode == MODE_STRIP_MEM) begin
          req_data.src  = SRC_MEM;
          req_data.addr = r_row + addr_t'(j);
        end else begin
          req_data.src  = SRC_SP;
          req_data.addr = tiled ? addr_t'(idx_t'(j - j0)) : addr_t'(j);
        end
      end
    end
  end

  assign seg_start     = (st == C_SEG);
  assign sink_to_mem   = (r_mode == MODE_STRIP_MEM) || last_seg;
  assign sink_mem_base = r_row + addr_t'(j0);
  assign sink_t_store  = tiled;

  logic cfg_bad;
  assign cfg_bad = (m == 0) || (n == 0) ||
                   (mode == MODE_STRIP_SP && 32'(n) + 1 > SP_WORDS) ||
                   (mode == MODE_TILED && (tile_d == 0 || 32'(tile_d) > SP_WORDS / 2)) ||
                   (mode != MODE_STRIP_MEM && mode != MODE_STRIP_SP && mode != MODE_TILED);

  function automatic idx_t tile_end(idx_t first, idx_t d, idx_t nn);
    return (32'(first) + 32'(d) - 1 >= 32'(nn)) ? nn : idx_t'(32'(first) + 32'(d) - 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; done <= 1'b0; cfg_error <= 1'b0;
      r_mode <= MODE_STRIP_MEM; r_m <= '0; r_n <= '0; r_d <= '0;
      r_s <= '0; r_t <= '0; r_row <= '0; r_c0 <= '0; r_c1 <= '0;
      row0 <= '0; j0 <= '0; j_end <= '0; j <= '0; first_seg <= 1'b0; cpar <= 1'b0;
      k <= 0; hs <= '0; ts <= 1'b0;
    end else begin
      unique case (st)
        C_IDLE, C_DONE: if (start) begin
          done <= 1'b0;
          cfg_error <= cfg_bad;
          if (cfg_bad) begin
            st <= C_DONE; done <= 1'b1;
          end else begin
            r_mode <= mode; r_m <= m; r_n <= n; r_d <= tile_d;
            r_s <= s_base; r_t <= t_base; r_row <= row_base; r_c0 <= col_base0; r_c1 <= col_base1;
            row0 <= 1; first_seg <= 1'b1; cpar <= 1'b0;
            if (mode == MODE_TILED) begin
              j0 <= 1; j_end <= tile_end(1, tile_d, n);
            end else begin
              j0 <= 0; j_end <= n;
            end
            st <= C_SEG;
          end
        end
        C_SEG: begin
          k <= 0; hs <= '0; st <= C_HDR;
        end
        C_HDR: if (req_ready) begin
          if (i_row <= r_m && tiled && hs != 2'd2) begin
            hs <= hs + 1'b1;
          end else begin
            hs <= '0;
            if (k == W - 1) begin
              st <= C_COLS; j <= j0; ts <= (j0 == 0);
            end else begin
              k <= k + 1;
            end
          end
        end
        C_COLS: if (req_ready) begin
          if (!ts) ts <= 1'b1;
          else if (j == j_end) st <= C_WAIT;
          else begin j <= j + 1'b1; ts <= 1'b0; end
        end
        C_WAIT: if (seg_done && array_idle && feeder_idle) begin
          if (!last_seg) begin
            row0 <= row0 + idx_t'(W); first_seg <= 1'b0; st <= C_SEG;
          end else if (tiled && j_end != r_n) begin
            row0 <= 1; first_seg <= 1'b1; cpar <= !cpar;
            j0 <= j_end + 1'b1; j_end <= tile_end(j_end + 1'b1, r_d, r_n);
            st <= C_SEG;
          end else begin
            st <= C_DONE; done <= 1'b1;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
