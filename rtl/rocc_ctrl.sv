// RoCC accelerator front end and control registers of the associative
// processor.
//
// The core drives an operation with two R-type custom instructions. The
// first, with funct = 0, loads the two input pointers (rs1 -> in_a,
// rs2 -> in_b). The second, with funct != 0, carries the vector length in
// rs1 and the output pointer in rs2; funct[2:0] selects the operation and
// funct[6:3] the word size in bytes. The operation code seen by the AP is
// {x, funct[2:0]}, x being the custom instruction number 0..3, so the four
// custom opcodes give room for 4 x 7 operations. The second instruction
// starts the operation; the front end then refuses new commands (cmd_ready
// low, busy high) until the operation is done, as the core waits for the
// AP. If the instruction asks for a result (xd), the response carries the
// status: bit XLEN-1 = error, bits 31:0 = cycles from start to done.
// A pointer-load instruction with xd set is answered with zero.
//
// DMA transfers use the same two steps: OP_DMALD copies rs1 (of the second
// instruction) bytes from main memory address in_a to scratch-pad address
// out; OP_DMAST copies from scratch-pad address in_a to main memory
// address out. A transfer that leaves the scratch-pad, or of zero bytes, is
// refused with the error bit.
//
// What follows the document: the two-step instruction pair, the funct
// layout (operation in the 3 low bits, word size in the 4 high bits), ADD
// as funct code 1 on custom-2, and the core waiting for the status. The
// other operation codes, the DMA commands and the status format are this
// design's own.
//
// Lint note: rst_n also appears in the assertions' "disable iff", which a
// linter reports as a reset used both asynchronously and synchronously; the
// assertions are not logic, and every flip-flop uses rst_n asynchronously.
module rocc_ctrl
  import ap_pkg::*;
#(
  parameter int unsigned XLEN    = 64,
  parameter int unsigned SPM_BYTES = AP_ROWS * AP_ROW_BYTES,
  parameter int unsigned MAW     = 32,
  parameter int unsigned LW      = 16,
  localparam int unsigned SAW    = $clog2(SPM_BYTES)
) (
  input  logic            clk,
  input  logic            rst_n,
  // RoCC command
  input  logic            cmd_valid,
  output logic            cmd_ready,
  input  logic [6:0]      cmd_opcode,
  input  logic [6:0]      cmd_funct,
  input  logic [4:0]      cmd_rd,
  input  logic            cmd_xd,
  input  logic [XLEN-1:0] cmd_rs1,
  input  logic [XLEN-1:0] cmd_rs2,
  // RoCC response
  output logic            resp_valid,
  input  logic            resp_ready,
  output logic [4:0]      resp_rd,
  output logic [XLEN-1:0] resp_data,
  output logic            busy,
  // control registers towards the associative controller
  output logic            ap_start,
  output ap_op_e          ap_op,
  output logic [XLEN-1:0] ap_in_a,
  output logic [XLEN-1:0] ap_in_b,
  output logic [XLEN-1:0] ap_out,
  output logic [XLEN-1:0] ap_len,
  output logic [3:0]      ap_ws,
  input  logic            ap_done,
  input  logic            ap_err,
  // towards the DMA engine
  output logic            dma_start,
  output logic            dma_dir,
  output logic [MAW-1:0]  dma_mem_base,
  output logic [SAW-1:0]  dma_spm_base,
  output logic [LW-1:0]   dma_len,
  input  logic            dma_done
);

  typedef enum logic [1:0] {R_IDLE, R_WAIT, R_RESP} rstate_e;

  rstate_e      st;
  logic         xd_q;
  logic         is_dma_q;
  logic [31:0]  cycles;

  logic [1:0]   x;
  ap_op_e       op_dec;
  logic         fire;

  always_comb begin
    unique case (cmd_opcode)
      RISCV_CUSTOM0: x = 2'd0;
      RISCV_CUSTOM1: x = 2'd1;
      RISCV_CUSTOM2: x = 2'd2;
      default:       x = 2'd3;
    endcase
  end

  assign op_dec = ap_op_e'({x, cmd_funct[2:0]});
  assign fire   = cmd_valid && cmd_ready;

  // DMA command checks (second instruction: rs1 = length, rs2 = out).
  logic [XLEN-1:0] spm_ptr, mem_ptr;
  logic            dma_ok, is_dma;
  assign is_dma  = (op_dec == OP_DMALD) || (op_dec == OP_DMAST);
  assign spm_ptr = (op_dec == OP_DMALD) ? cmd_rs2 : ap_in_a;
  assign mem_ptr = (op_dec == OP_DMALD) ? ap_in_a : cmd_rs2;
  assign dma_ok  = (cmd_rs1 != '0) && (cmd_rs1 < XLEN'(1 << LW)) &&
                   (spm_ptr < XLEN'(SPM_BYTES)) &&
                   (spm_ptr + cmd_rs1 <= XLEN'(SPM_BYTES)) &&
                   ((mem_ptr >> MAW) == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= R_IDLE;
      xd_q         <= 1'b0;
      is_dma_q     <= 1'b0;
      cycles       <= '0;
      resp_rd      <= '0;
      resp_data    <= '0;
      ap_start     <= 1'b0;
      ap_op        <= OP_NONE;
      ap_in_a      <= '0;
      ap_in_b      <= '0;
      ap_out       <= '0;
      ap_len       <= '0;
      ap_ws        <= '0;
      dma_start    <= 1'b0;
      dma_dir      <= 1'b0;
      dma_mem_base <= '0;
      dma_spm_base <= '0;
      dma_len      <= '0;
    end else begin
      ap_start  <= 1'b0;
      dma_start <= 1'b0;
      unique case (st)
        R_IDLE: if (fire) begin
          xd_q    <= cmd_xd;
          resp_rd <= cmd_rd;
          if (cmd_funct == 7'd0) begin
            ap_in_a   <= cmd_rs1;
            ap_in_b   <= cmd_rs2;
            resp_data <= '0;
            if (cmd_xd) st <= R_RESP;
          end else begin
            ap_op  <= op_dec;
            ap_ws  <= cmd_funct[6:3];
            ap_len <= cmd_rs1;
            ap_out <= cmd_rs2;
            cycles <= '0;
            if (is_dma && dma_ok) begin
              is_dma_q     <= 1'b1;
              dma_start    <= 1'b1;
              dma_dir      <= (op_dec == OP_DMAST);
              dma_mem_base <= MAW'(mem_ptr);
              dma_spm_base <= SAW'(spm_ptr);
              dma_len      <= LW'(cmd_rs1);
              st           <= R_WAIT;
            end else if (is_assoc_op(op_dec)) begin
              is_dma_q <= 1'b0;
              ap_start <= 1'b1;
              st       <= R_WAIT;
            end else begin
              // Unknown operation or refused transfer.
              resp_data <= {1'b1, {(XLEN-1){1'b0}}};
              if (cmd_xd) st <= R_RESP;
            end
          end
        end
        R_WAIT: begin
          cycles <= cycles + 32'd1;
          if (is_dma_q ? dma_done : ap_done) begin
            resp_data <= {(is_dma_q ? 1'b0 : ap_err), {(XLEN-33){1'b0}}, cycles + 32'd1};
            st        <= cmd_xd_done(xd_q);
          end
        end
        default: if (resp_ready) st <= R_IDLE;  // R_RESP
      endcase
    end
  end

  function automatic rstate_e cmd_xd_done(logic xd);
    return xd ? R_RESP : R_IDLE;
  endfunction

  assign cmd_ready  = (st == R_IDLE);
  assign busy       = (st != R_IDLE);
  assign resp_valid = (st == R_RESP);

  a_resp_stable: assert property (@(posedge clk) disable iff (!rst_n)
    resp_valid && !resp_ready |=> resp_valid && $stable(resp_data));

endmodule
