// Associative processing unit of the tile: RoCC front end, associative
// processor working as a scratch-pad memory (SPM), and its DMA engine.
//
// The host RISC-V core reaches this block three ways: RoCC custom
// instructions (cmd_*/resp_*) configure and start associative operations
// and DMA transfers; ordinary loads and stores (spm_*) read and write the
// scratch-pad bytes; and the DMA engine moves blocks between the scratch-pad
// and main memory (mem_*), bypassing the caches. Associative operations and
// core accesses do not overlap: while an operation or a transfer runs,
// spm_gnt is low and the core's scratch-pad accesses are not taken.
//
// Inside, rocc_ctrl holds the control registers and starts either the
// ap_controller (which drives the CAM's parallel compare/write port and,
// for COPY, its row port) or the ap_dma. The CAM row port is shared by the
// DMA, the COPY operation and the core, in that order of priority.
//
// Scratch-pad byte address a is CAM row a % ROWS, byte column a / ROWS.
// Core load/store port: a request taken when spm_req && spm_gnt; read data
// appear on spm_rdata in the next cycle; writes take effect at the clock
// edge.
//
// The partition into RoCC accelerator, control registers, SPM-resident AP
// and DMA follows the document's architectural model; the port protocols
// are this design's own.
//
// Lint note: rst_n also appears in the assertions' "disable iff", which a
// linter reports as a reset used both asynchronously and synchronously; the
// assertions are not logic, and every flip-flop uses rst_n asynchronously.
module rva_top
  import ap_pkg::*;
#(
  parameter int unsigned ROWS      = AP_ROWS,
  parameter int unsigned ROW_BYTES = AP_ROW_BYTES,
  parameter int unsigned XLEN      = 64,
  parameter int unsigned MAW       = 32,
  parameter int unsigned LW        = 16,
  localparam int unsigned RAW      = $clog2(ROWS),
  localparam int unsigned CAW      = $clog2(ROW_BYTES),
  localparam int unsigned SAW      = RAW + CAW,
  localparam int unsigned W        = ROW_BYTES * 8 + 2
) (
  input  logic            clk,
  input  logic            rst_n,
  // RoCC command / response
  input  logic            cmd_valid,
  output logic            cmd_ready,
  input  logic [6:0]      cmd_opcode,
  input  logic [6:0]      cmd_funct,
  input  logic [4:0]      cmd_rd,
  input  logic            cmd_xd,
  input  logic [XLEN-1:0] cmd_rs1,
  input  logic [XLEN-1:0] cmd_rs2,
  output logic            resp_valid,
  input  logic            resp_ready,
  output logic [4:0]      resp_rd,
  output logic [XLEN-1:0] resp_data,
  output logic            busy,
  // core load/store port to the scratch-pad
  input  logic            spm_req,
  input  logic            spm_we,
  input  logic [SAW-1:0]  spm_addr,
  input  logic [7:0]      spm_wdata,
  output logic            spm_gnt,
  output logic [7:0]      spm_rdata,
  // main memory port of the DMA
  output logic            mem_req,
  output logic            mem_we,
  output logic [MAW-1:0]  mem_addr,
  output logic [7:0]      mem_wdata,
  input  logic            mem_gnt,
  input  logic            mem_rvalid,
  input  logic [7:0]      mem_rdata,
  // event counters of the last associative operation
  output logic [31:0]     ap_cnt_pass,
  output logic [31:0]     ap_cnt_write
);

  // RoCC front end -> controller / DMA
  logic            ap_start, ap_done, ap_err, ap_busy;
  ap_op_e          ap_op;
  logic [XLEN-1:0] ap_in_a, ap_in_b, ap_out, ap_len;
  logic [3:0]      ap_ws;
  logic            dma_start, dma_dir, dma_done, dma_busy;
  logic [MAW-1:0]  dma_mem_base;
  logic [SAW-1:0]  dma_spm_base;
  logic [LW-1:0]   dma_len;

  rocc_ctrl #(
    .XLEN(XLEN), .SPM_BYTES(ROWS * ROW_BYTES), .MAW(MAW), .LW(LW)
  ) u_rocc (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_opcode, .cmd_funct, .cmd_rd, .cmd_xd,
    .cmd_rs1, .cmd_rs2,
    .resp_valid, .resp_ready, .resp_rd, .resp_data, .busy,
    .ap_start, .ap_op, .ap_in_a, .ap_in_b, .ap_out, .ap_len, .ap_ws,
    .ap_done, .ap_err,
    .dma_start, .dma_dir, .dma_mem_base, .dma_spm_base, .dma_len, .dma_done
  );

  // Controller <-> CAM
  logic            cmp_en, wr_en, any_match;
  logic [W-1:0]    cmp_mask, cmp_key, wr_mask, wr_data;
  logic [RAW-1:0]  row_lo;
  logic [RAW:0]    row_cnt;
  logic [RAW-1:0]  c_raddr, c_waddr;
  logic            c_we;
  logic [W-1:0]    c_wmask, c_wdata;
  logic [W-1:0]    row_rdata;

  ap_controller #(
    .ROWS(ROWS), .ROW_BYTES(ROW_BYTES), .XLEN(XLEN)
  ) u_ctrl (
    .clk, .rst_n,
    .start(ap_start), .op(ap_op), .in_a(ap_in_a), .in_b(ap_in_b),
    .out(ap_out), .len(ap_len), .ws(ap_ws),
    .busy(ap_busy), .done(ap_done), .err(ap_err),
    .cnt_pass(ap_cnt_pass), .cnt_write(ap_cnt_write),
    .cmp_en, .cmp_mask, .cmp_key, .row_lo, .row_cnt,
    .wr_en, .wr_mask, .wr_data, .any_match,
    .row_raddr(c_raddr), .row_waddr(c_waddr), .row_we(c_we),
    .row_wmask(c_wmask), .row_wdata(c_wdata), .row_rdata
  );

  // DMA
  logic            d_we;
  logic [SAW-1:0]  d_waddr, d_raddr;
  logic [7:0]      d_wdata, d_rdata;

  ap_dma #(.MAW(MAW), .SAW(SAW), .LW(LW)) u_dma (
    .clk, .rst_n,
    .start(dma_start), .dir(dma_dir), .mem_base(dma_mem_base),
    .spm_base(dma_spm_base), .len(dma_len), .busy(dma_busy), .done(dma_done),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .spm_we(d_we), .spm_waddr(d_waddr), .spm_wdata(d_wdata),
    .spm_raddr(d_raddr), .spm_rdata(d_rdata)
  );

  // Row port sharing: DMA, then COPY, then the core.
  logic [RAW-1:0]  raddr, waddr;
  logic            we;
  logic [W-1:0]    wmask, wdata;
  logic [SAW-1:0]  rd_byte_addr;

  function automatic logic [W-1:0] byte_lane(logic [SAW-1:0] a);
    return W'(8'hFF) << {a[SAW-1:RAW], 3'b000};
  endfunction

  function automatic logic [W-1:0] byte_data(logic [SAW-1:0] a, logic [7:0] d);
    return W'(d) << {a[SAW-1:RAW], 3'b000};
  endfunction

  assign spm_gnt = !(dma_busy || ap_busy || busy);

  always_comb begin
    rd_byte_addr = spm_addr;
    raddr = spm_addr[RAW-1:0];
    waddr = spm_addr[RAW-1:0];
    we    = spm_req && spm_we && spm_gnt;
    wmask = byte_lane(spm_addr);
    wdata = byte_data(spm_addr, spm_wdata);
    if (dma_busy) begin
      rd_byte_addr = d_raddr;
      raddr = d_raddr[RAW-1:0];
      waddr = d_waddr[RAW-1:0];
      we    = d_we;
      wmask = byte_lane(d_waddr);
      wdata = byte_data(d_waddr, d_wdata);
    end else if (ap_busy) begin
      raddr = c_raddr;
      waddr = c_waddr;
      we    = c_we;
      wmask = c_wmask;
      wdata = c_wdata;
    end
  end

  logic [7:0] rd_byte;
  assign rd_byte = 8'(row_rdata >> {rd_byte_addr[SAW-1:RAW], 3'b000});
  assign d_rdata = rd_byte;

  ap_cam #(.ROWS(ROWS), .ROW_BYTES(ROW_BYTES)) u_cam (
    .clk, .rst_n,
    .cmp_en, .cmp_mask, .cmp_key, .row_lo, .row_cnt,
    .wr_en, .wr_mask, .wr_data, .any_match,
    .tags(), .mask_q(), .key_q(),
    .row_raddr(raddr), .row_waddr(waddr), .row_we(we),
    .row_wmask(wmask), .row_wdata(wdata), .row_rdata
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) spm_rdata <= '0;
    else if (spm_req && !spm_we && spm_gnt) spm_rdata <= rd_byte;
  end

endmodule
