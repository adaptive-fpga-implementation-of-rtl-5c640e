// fft2d: two-dimensional FFT/IFFT of an NR x NC frame by the row-column
// method, on one pipelined R2SDF core and one frame buffer.
//
// The 2-D DFT separates into 1-D DFTs along every row followed by 1-D DFTs
// along every column. A small controller runs four phases:
//   LOAD  the frame arrives in raster order and is written to the buffer;
//   ROWS  each row is streamed through the FFT core (length NC, in_sync at
//         every row start); results come out bit-reversed and are written
//         back to their natural column position of the same row;
//   COLS  each column is streamed through the core, whose length is switched
//         to NR; results are written back to their natural row position;
//   OUT   the buffer is read out in raster order, X(k, l) with k the row
//         (vertical) frequency and l the column frequency.
// After the last row or column the core is fed zero padding until every
// result is back in the buffer. A row (column) is only written after it has
// been read, so reading and writing share the buffer without conflict.
//
// Interface: in_ready is high in LOAD; in_valid/in_re/in_im take the frame.
// inverse (sampled with the first pixel) selects the inverse transform,
// including its 1/(NR*NC) factor: an inverse frame is divided by NR*NC on the
// way out (arithmetic shift right by LOG2R+LOG2C, rounded half up), so a
// forward then inverse pair returns the original samples. out_valid/out_re/out_im/out_row/out_col
// give the result, out_last marks its final sample.
// Timing: one sample per clock in every phase; LOAD, ROWS, COLS and OUT
// take NR*NC cycles each, plus a pipeline drain after ROWS and after COLS.
//
// The transform follows the published 2-D DFT definition; the frame size
// (64 x 64), the row-column schedule and the single shared core are this
// design's choices.
module fft2d #(
  parameter int IN_W  = 8,
  parameter int LOG2R = 6,   // rows: NR = 2^LOG2R
  parameter int LOG2C = 6,   // columns: NC = 2^LOG2C
  localparam int LMAX  = (LOG2R > LOG2C) ? LOG2R : LOG2C,
  localparam int LMIN  = (LOG2R > LOG2C) ? LOG2C : LOG2R,
  localparam int CIN_W = IN_W + LOG2C + 1,          // core input width
  localparam int OUT_W = CIN_W + LMAX + 1           // core output / buffer width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    inverse,
  output logic                    in_ready,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  output logic                    out_valid,
  output logic                    out_last,
  output logic [LOG2R-1:0]        out_row,
  output logic [LOG2C-1:0]        out_col,
  output logic signed [OUT_W-1:0] out_re,
  output logic signed [OUT_W-1:0] out_im
);

  localparam int NR = 1 << LOG2R;
  localparam int NC = 1 << LOG2C;
  localparam int AW = LOG2R + LOG2C;
  localparam int LW = $clog2(LMAX + 1);

  typedef enum logic [1:0] {LOAD, ROWS, COLS, OUT} phase_e;
  phase_e state_q;

  logic signed [OUT_W-1:0] mem_re [NR*NC];
  logic signed [OUT_W-1:0] mem_im [NR*NC];

  logic [AW:0]   rd_q;        // read counter (one bit extra: padding)
  logic [AW:0]   wr_q;        // results written back
  logic [AW-1:0] lcnt_q;      // LOAD / OUT position
  logic          inv_q;

  // ---- read side: address generation and FFT feed ----
  logic [AW-1:0] rd_addr;
  logic          rd_en, pad;
  logic          f_valid_q, f_sync_q, f_pad_q;

  always_comb begin
    pad     = rd_q[AW];
    rd_en   = (state_q == ROWS || state_q == COLS) && (wr_q[AW] == 1'b0);
    if (state_q == COLS)
      rd_addr = {rd_q[LOG2R-1:0], rd_q[AW-1:LOG2R]};   // column-major walk
    else
      rd_addr = rd_q[AW-1:0];
  end

  // Core input: buffer read registered (synchronous read)
  logic signed [OUT_W-1:0] rdat_re_q, rdat_im_q;
  logic signed [CIN_W-1:0] c_in_re, c_in_im;
  logic                    c_out_valid, c_out_sync;
  logic signed [CIN_W+LMAX:0] c_out_re, c_out_im;
  logic [LMAX-1:0]         c_out_index;
  logic [LW-1:0]           c_log2n;

  assign c_in_re = f_pad_q ? '0 : CIN_W'(rdat_re_q);
  assign c_in_im = f_pad_q ? '0 : CIN_W'(rdat_im_q);
  assign c_log2n = (state_q == COLS) ? LW'(LOG2R) : LW'(LOG2C);

  fft_r2sdf #(.IN_W(CIN_W), .LOG2N_MAX(LMAX), .LOG2N_MIN(LMIN)) u_fft (
    .clk, .rst_n, .inverse(inv_q), .log2n(c_log2n),
    .in_valid(f_valid_q), .in_sync(f_sync_q), .in_re(c_in_re), .in_im(c_in_im),
    .out_valid(c_out_valid), .out_sync(c_out_sync), .out_re(c_out_re), .out_im(c_out_im),
    .out_index(c_out_index)
  );

  // ---- write-back side ----
  logic          cap_q;          // capturing results of the current pass
  logic [AW-1:0] wline_q;        // line (row or column) being written
  logic [AW-1:0] wr_addr;
  logic          wr_take;

  assign wr_take = c_out_valid && (c_out_sync || cap_q) && !wr_q[AW];
  always_comb begin
    logic [AW-1:0] line;
    line = c_out_sync ? AW'(wr_q >> ((state_q == COLS) ? LOG2R : LOG2C)) : wline_q;
    if (state_q == COLS)
      wr_addr = AW'((AW'(c_out_index) << LOG2C) | AW'(line));
    else
      wr_addr = AW'((AW'(line) << LOG2C) | AW'(c_out_index));
  end

  logic pass_done;
  assign pass_done = wr_q[AW];

  always_ff @(posedge clk) begin
    if (state_q == LOAD && in_valid) begin
      mem_re[lcnt_q] <= OUT_W'(in_re);
      mem_im[lcnt_q] <= OUT_W'(in_im);
    end else if (wr_take && (state_q == ROWS || state_q == COLS)) begin
      mem_re[wr_addr] <= OUT_W'(c_out_re);
      mem_im[wr_addr] <= OUT_W'(c_out_im);
    end
    rdat_re_q <= mem_re[(state_q == OUT) ? lcnt_q : rd_addr];
    rdat_im_q <= mem_im[(state_q == OUT) ? lcnt_q : rd_addr];
  end

  logic out_pend_q, out_last_q, out_inv_q;

  // Division by NR*NC with rounding; one extra bit keeps the rounding
  // constant from overflowing.
  function automatic logic signed [OUT_W-1:0] div_nm(input logic signed [OUT_W-1:0] v);
    logic signed [OUT_W:0] t;
    t = (OUT_W+1)'(v) + ((OUT_W+1)'(1) <<< (AW - 1));
    return OUT_W'(t >>> AW);
  endfunction
  logic [AW-1:0] out_pos_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= LOAD;
      rd_q       <= '0;
      wr_q       <= '0;
      lcnt_q     <= '0;
      inv_q      <= 1'b0;
      f_valid_q  <= 1'b0;
      f_sync_q   <= 1'b0;
      f_pad_q    <= 1'b0;
      cap_q      <= 1'b0;
      wline_q    <= '0;
      out_pend_q <= 1'b0;
      out_last_q <= 1'b0;
      out_inv_q  <= 1'b0;
      out_pos_q  <= '0;
    end else begin
      f_valid_q  <= rd_en;
      f_sync_q   <= rd_en && !pad &&
                    ((state_q == COLS) ? (rd_q[LOG2R-1:0] == '0) : (rd_q[LOG2C-1:0] == '0));
      f_pad_q    <= pad;
      out_pend_q <= 1'b0;
      out_last_q <= 1'b0;
      if (rd_en) rd_q <= pad ? rd_q : rd_q + 1'b1;
      if (wr_take) begin
        wr_q    <= wr_q + 1'b1;
        cap_q   <= 1'b1;
        if (c_out_sync) wline_q <= AW'(wr_q >> ((state_q == COLS) ? LOG2R : LOG2C));
      end
      unique case (state_q)
        LOAD: if (in_valid) begin
          if (lcnt_q == '0) inv_q <= inverse;
          lcnt_q <= lcnt_q + 1'b1;
          if (lcnt_q == AW'(NR * NC - 1)) begin
            state_q <= ROWS;
            rd_q    <= '0;
            wr_q    <= '0;
            cap_q   <= 1'b0;
          end
        end
        ROWS: if (pass_done) begin
          state_q <= COLS;
          rd_q    <= '0;
          wr_q    <= '0;
          cap_q   <= 1'b0;
        end
        COLS: if (pass_done) begin
          state_q <= OUT;
          lcnt_q  <= '0;
          cap_q   <= 1'b0;
        end
        OUT: begin
          out_pend_q <= 1'b1;
          out_pos_q  <= lcnt_q;
          out_inv_q  <= inv_q;
          out_last_q <= (lcnt_q == AW'(NR * NC - 1));
          lcnt_q     <= lcnt_q + 1'b1;
          if (lcnt_q == AW'(NR * NC - 1)) state_q <= LOAD;
        end
      endcase
    end
  end

  assign in_ready  = (state_q == LOAD);
  assign out_valid = out_pend_q;
  assign out_last  = out_last_q;
  assign out_row   = out_pos_q[AW-1:LOG2C];
  assign out_col   = out_pos_q[LOG2C-1:0];
  assign out_re    = out_inv_q ? div_nm(rdat_re_q) : rdat_re_q;
  assign out_im    = out_inv_q ? div_nm(rdat_im_q) : rdat_im_q;

endmodule
