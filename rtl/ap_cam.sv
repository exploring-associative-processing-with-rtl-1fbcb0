// Content-addressable memory of the associative processor, with its Mask
// and Key registers and one Tag bit per row.
//
// Each row holds ROW_BYTES data bytes followed by two flag columns, C at bit
// ROW_BITS and M at bit ROW_BITS+1, so a row is W = ROW_BITS+2 bits wide.
//
// Compare (cmp_en): the mask and key given with the command are loaded into
// the Mask and Key registers and, in the same clock edge, every row in the
// window [row_lo, row_lo+row_cnt) sets its tag when all of its bits selected
// by the mask equal the key; rows outside the window clear their tag. This
// is the one-cycle parallel search of the CAM.
// Write (wr_en): every row whose tag is set replaces the bits selected by
// wr_mask with wr_data, all rows in one cycle. any_match is the OR of the
// tags and is valid in the cycle after a compare.
// Row port: row_rdata shows row row_raddr combinationally; row_we writes the
// bits of row row_waddr selected by row_wmask at the clock edge. Separate
// read and write addresses let COPY move one element per cycle. The
// scratch-pad byte accesses, the DMA and the element-wise COPY use this port.
//
// Reset clears the tags, the Mask and Key registers and both flag columns;
// the data bytes are not reset (they are loaded before use). Every row is a
// register row with its own comparator, as a CAM's cells compare in place.
// The search and parallel write follow the document's description of the CAM; the row window, the
// row port and the flag columns are this design's own choices.
//
// Lint note: rst_n also appears in the assertions' "disable iff", which a
// linter reports as a reset used both asynchronously and synchronously; the
// assertions are not logic, and every flip-flop uses rst_n asynchronously.
module ap_cam #(
  parameter int unsigned ROWS      = ap_pkg::AP_ROWS,
  parameter int unsigned ROW_BYTES = ap_pkg::AP_ROW_BYTES,
  localparam int unsigned ROW_BITS = ROW_BYTES * 8,
  localparam int unsigned W        = ROW_BITS + 2,
  localparam int unsigned RAW      = $clog2(ROWS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // parallel compare
  input  logic           cmp_en,
  input  logic [W-1:0]   cmp_mask,
  input  logic [W-1:0]   cmp_key,
  input  logic [RAW-1:0] row_lo,
  input  logic [RAW:0]   row_cnt,
  // parallel write of the tagged rows
  input  logic           wr_en,
  input  logic [W-1:0]   wr_mask,
  input  logic [W-1:0]   wr_data,
  output logic           any_match,
  output logic [ROWS-1:0] tags,
  output logic [W-1:0]   mask_q,
  output logic [W-1:0]   key_q,
  // row port
  input  logic [RAW-1:0] row_raddr,
  input  logic [RAW-1:0] row_waddr,
  input  logic           row_we,
  input  logic [W-1:0]   row_wmask,
  input  logic [W-1:0]   row_wdata,
  output logic [W-1:0]   row_rdata
);

  // One register row per CAM row: packed, so that every row is plain
  // flip-flops with its own compare and write logic.
  logic [ROWS-1:0][ROW_BITS-1:0] data;
  logic [ROWS-1:0]               cflag;
  logic [ROWS-1:0]               mflag;
  logic [ROWS-1:0]               in_win;
  logic [ROWS-1:0]               hit;
  logic [ROWS-1:0]               row_sel;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    logic [W-1:0]   row;
    logic [RAW+1:0] offs;
    assign row        = {mflag[r], cflag[r], data[r]};
    // Row window of the current operation: 0 <= r - row_lo < row_cnt.
    assign offs       = (RAW+2)'(r) - (RAW+2)'(row_lo);
    assign in_win[r]  = !offs[RAW+1] && (offs[RAW:0] < row_cnt);
    assign hit[r]     = in_win[r] && (((row ^ cmp_key) & cmp_mask) == '0);
    assign row_sel[r] = row_we && (row_waddr == RAW'(r));

    // Data columns: parallel write or row-port write.
    always_ff @(posedge clk) begin
      if (wr_en && tags[r]) begin
        data[r] <= (data[r] & ~wr_mask[ROW_BITS-1:0]) | (wr_data[ROW_BITS-1:0] & wr_mask[ROW_BITS-1:0]);
      end else if (row_sel[r]) begin
        data[r] <= (data[r] & ~row_wmask[ROW_BITS-1:0]) | (row_wdata[ROW_BITS-1:0] & row_wmask[ROW_BITS-1:0]);
      end
    end

    // Flag columns, reset to zero.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cflag[r] <= 1'b0;
        mflag[r] <= 1'b0;
      end else if (wr_en && tags[r]) begin
        if (wr_mask[ROW_BITS])   cflag[r] <= wr_data[ROW_BITS];
        if (wr_mask[ROW_BITS+1]) mflag[r] <= wr_data[ROW_BITS+1];
      end else if (row_sel[r]) begin
        if (row_wmask[ROW_BITS])   cflag[r] <= row_wdata[ROW_BITS];
        if (row_wmask[ROW_BITS+1]) mflag[r] <= row_wdata[ROW_BITS+1];
      end
    end
  end

  // Compare: load Mask and Key, set the tags, all in one edge.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tags   <= '0;
      mask_q <= '0;
      key_q  <= '0;
    end else if (cmp_en) begin
      mask_q <= cmp_mask;
      key_q  <= cmp_key;
      tags   <= hit;
    end
  end

  assign any_match = |tags;

  assign row_rdata = {mflag[row_raddr], cflag[row_raddr], data[row_raddr]};

  // The controller never mixes a parallel write with a row-port write.
  a_no_mixed_write: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && row_we));
  a_no_cmp_and_write: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && cmp_en));

endmodule
