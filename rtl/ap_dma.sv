// DMA engine between main memory and the associative processor's
// scratch-pad memory.
//
// A transfer moves `len` bytes between main memory address mem_base and
// scratch-pad address spm_base, in either direction (dir = 0: main memory
// to scratch-pad, dir = 1: scratch-pad to main memory). It first spends
// SETUP cycles of communication, then moves one byte per cycle, which is the
// document's DMA cost of 11 cycles plus one cycle per datum transferred.
//
// Main-memory port: a request (mem_req, mem_we, mem_addr, mem_wdata) is
// taken in a cycle where mem_gnt is high; read data come back with
// mem_rvalid, in order, any number of cycles later. The cycle in which
// start is taken counts as the first setup cycle. With a memory that grants
// every cycle and answers the next one, the store's last byte leaves
// SETUP + len cycles after start and done is registered one edge later
// (SETUP + len + 1 edges after the edge that takes start); a load takes one
// more cycle, its last byte arriving one cycle after its request. done is a
// one-cycle pulse; busy is high from the edge that takes start until done.
// Scratch-pad port: one byte per cycle; spm_rdata answers spm_raddr in the
// same cycle (the scratch-pad is read combinationally).
//
// The 11 setup cycles and the per-datum cost follow the document; the byte
// width of a datum, the request/grant memory port and the direction flag
// are this design's own choices.
module ap_dma #(
  parameter int unsigned MAW   = 32,                 // main memory address bits
  parameter int unsigned SAW   = 14,                 // scratch-pad address bits
  parameter int unsigned LW    = 16,                 // length bits
  parameter int unsigned SETUP = ap_pkg::DMA_SETUP
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           dir,
  input  logic [MAW-1:0] mem_base,
  input  logic [SAW-1:0] spm_base,
  input  logic [LW-1:0]  len,
  output logic           busy,
  output logic           done,
  // main memory
  output logic           mem_req,
  output logic           mem_we,
  output logic [MAW-1:0] mem_addr,
  output logic [7:0]     mem_wdata,
  input  logic           mem_gnt,
  input  logic           mem_rvalid,
  input  logic [7:0]     mem_rdata,
  // scratch-pad
  output logic           spm_we,
  output logic [SAW-1:0] spm_waddr,
  output logic [7:0]     spm_wdata,
  output logic [SAW-1:0] spm_raddr,
  input  logic [7:0]     spm_rdata
);

  typedef enum logic [1:0] {D_IDLE, D_SETUP, D_XFER} dstate_e;

  dstate_e        st;
  logic           dir_q;
  logic [MAW-1:0] mbase_q;
  logic [SAW-1:0] sbase_q;
  logic [LW-1:0]  len_q, issued, received;
  logic [$clog2(SETUP+1)-1:0] wait_cnt;

  logic issue, all_issued, finished;
  assign all_issued = (issued == len_q);
  assign issue      = (st == D_XFER) && !all_issued;
  assign finished   = dir_q ? all_issued : (received == len_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= D_IDLE;
      dir_q    <= 1'b0;
      mbase_q  <= '0;
      sbase_q  <= '0;
      len_q    <= '0;
      issued   <= '0;
      received <= '0;
      wait_cnt <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        D_IDLE: if (start) begin
          dir_q    <= dir;
          mbase_q  <= mem_base;
          sbase_q  <= spm_base;
          len_q    <= len;
          issued   <= '0;
          received <= '0;
          wait_cnt <= '0;
          st       <= D_SETUP;
        end
        D_SETUP: begin
          // The start cycle is the first communication cycle.
          if (32'(wait_cnt) + 32'd2 >= SETUP) st <= D_XFER;
          wait_cnt <= wait_cnt + 1'b1;
        end
        D_XFER: begin
          if (issue && mem_gnt) issued <= issued + 1'b1;
          if (!dir_q && mem_rvalid) received <= received + 1'b1;
          if (finished) begin
            st   <= D_IDLE;
            done <= 1'b1;
          end
        end
        default: st <= D_IDLE;
      endcase
    end
  end

  assign busy      = (st != D_IDLE);
  assign mem_req   = issue;
  assign mem_we    = dir_q;
  assign mem_addr  = mbase_q + MAW'(issued);
  assign spm_raddr = sbase_q + SAW'(issued);
  assign mem_wdata = spm_rdata;
  assign spm_we    = (st == D_XFER) && !dir_q && mem_rvalid;
  assign spm_waddr = sbase_q + SAW'(received);
  assign spm_wdata = mem_rdata;

endmodule
