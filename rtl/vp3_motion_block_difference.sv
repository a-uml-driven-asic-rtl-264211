// vp3_motion_block_difference: residual of one 8x8 block against its
// motion-compensated prediction, read from a reference frame in memory.
//
// How it works: on `start` the motion vector is turned into two reference
// positions. The vector divisor selects a shift and mask (divisor 2: shift 1,
// mask 1; divisor 4: shift 2, mask 3; otherwise the vector is in whole
// pixels). The baseline offset is (mv_y / divisor) * STRIDE + mv_x / divisor,
// the divisions truncating towards zero. A fractional x part moves the
// second reference one pixel right (mv_x > 0) or left, a fractional y part
// one line down (mv_y > 0) or up. The golden frame is used when `golden` is
// set, otherwise the last frame. If both reference positions coincide the
// block is differenced with vp3_sub8 (src - ref), otherwise with vp3_sub8av2
// (src - truncated average of the two references).
//
// Interface and timing: the block position `frag_pos` is the pixel index of
// its top-left corner within a frame buffer; the current frame starts at
// src_base and the references at last_base and golden_base, all in one
// pixel address space. One clock after `start` the unit issues 64 reads, one
// per clock with rd_en, in raster order on src_addr, ref1_addr and ref2_addr;
// the memory answers on src_data, ref1_data and ref2_data one clock after
// rd_en. Each difference leaves one clock after its data with out_valid
// (signed 9-bit diff); `half` tells which difference unit is used. busy is
// high from start until the last read has been issued; a start while busy is
// ignored. Synchronous active-high reset.
//
// The steps (divisor decoding, baseline offset, second-reference offset,
// frame choice, choice between the two difference units) follow the
// document's activity diagram. The memory interface, the truncating
// division and the line stride value are this design's choices.
module vp3_motion_block_difference #(
  parameter int ADDR_W = 20,
  parameter int STRIDE = 416
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic signed [7:0] mv_x,
  input  logic signed [7:0] mv_y,
  input  logic [2:0]        mv_divisor,
  input  logic              golden,
  input  logic [ADDR_W-1:0] frag_pos,
  input  logic [ADDR_W-1:0] src_base,
  input  logic [ADDR_W-1:0] last_base,
  input  logic [ADDR_W-1:0] golden_base,
  output logic              busy,
  output logic              rd_en,
  output logic [ADDR_W-1:0] src_addr,
  output logic [ADDR_W-1:0] ref1_addr,
  output logic [ADDR_W-1:0] ref2_addr,
  input  logic [7:0]        src_data,
  input  logic [7:0]        ref1_data,
  input  logic [7:0]        ref2_data,
  output logic              half,
  output logic              out_valid,
  output logic signed [8:0] diff
);
  // Decoded vector (combinational, used on start).
  logic [1:0]              shift, mask;
  logic signed [7:0]       qx, qy;
  logic signed [ADDR_W:0]  mv_off, r2_off;
  logic [ADDR_W-1:0]       src_row, ref1_row, ref2_row;
  logic [5:0]              idx;
  logic                    rd_d, half_d;
  logic signed [8:0]       d_full, d_half;
  logic                    v_full, v_half;

  always_comb begin
    unique case (mv_divisor)
      3'd2:    begin shift = 2'd1; mask = 2'd1; end
      3'd4:    begin shift = 2'd2; mask = 2'd3; end
      default: begin shift = 2'd0; mask = 2'd0; end
    endcase
    // C-style division by 2^shift: truncation towards zero.
    qx = (mv_x < 0) ? -((-mv_x) >>> shift) : (mv_x >>> shift);
    qy = (mv_y < 0) ? -((-mv_y) >>> shift) : (mv_y >>> shift);
    mv_off = (ADDR_W+1)'(qy) * (ADDR_W+1)'(STRIDE) + (ADDR_W+1)'(qx);
    r2_off = '0;
    if ((mv_x[1:0] & mask) != 2'd0) r2_off = (mv_x > 0) ? r2_off + 1 : r2_off - 1;
    if ((mv_y[1:0] & mask) != 2'd0) r2_off = (mv_y > 0) ? r2_off + (ADDR_W+1)'(STRIDE) : r2_off - (ADDR_W+1)'(STRIDE);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy     <= 1'b0;
      rd_en    <= 1'b0;
      rd_d     <= 1'b0;
      half_d   <= 1'b0;
      half     <= 1'b0;
      idx      <= '0;
      src_row  <= '0;
      ref1_row <= '0;
      ref2_row <= '0;
    end else begin
      rd_d   <= rd_en;
      half_d <= half;
      rd_en  <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        idx      <= '0;
        src_row  <= src_base + frag_pos;
        ref1_row <= (golden ? golden_base : last_base) + frag_pos + ADDR_W'(mv_off);
        ref2_row <= (golden ? golden_base : last_base) + frag_pos + ADDR_W'(mv_off + r2_off);
        half     <= (r2_off != '0);
      end else if (busy) begin
        rd_en <= 1'b1;
        idx   <= idx + 1'b1;
        if (idx[2:0] == 3'd7) begin
          src_row  <= src_row  + ADDR_W'(STRIDE);
          ref1_row <= ref1_row + ADDR_W'(STRIDE);
          ref2_row <= ref2_row + ADDR_W'(STRIDE);
        end
        if (idx == 6'd63) busy <= 1'b0;
      end
    end
  end

  // Address of the read issued this clock: row start plus column, held
  // stable with rd_en.
  always_ff @(posedge clk) begin
    if (rst) begin
      src_addr  <= '0;
      ref1_addr <= '0;
      ref2_addr <= '0;
    end else if (busy) begin
      src_addr  <= src_row  + ADDR_W'(idx[2:0]);
      ref1_addr <= ref1_row + ADDR_W'(idx[2:0]);
      ref2_addr <= ref2_row + ADDR_W'(idx[2:0]);
    end
  end

  vp3_sub8 u_full (
    .clk, .rst, .in_valid(rd_d && !half_d), .src(src_data), .ref_pix(ref1_data),
    .out_valid(v_full), .diff(d_full)
  );
  vp3_sub8av2 u_half (
    .clk, .rst, .in_valid(rd_d && half_d), .src(src_data), .ref1(ref1_data), .ref2(ref2_data),
    .out_valid(v_half), .diff(d_half)
  );

  assign out_valid = v_full || v_half;
  assign diff      = v_half ? d_half : d_full;
endmodule
