// Self-checking testbench of rocc_ctrl.
//
// Issues RoCC command pairs (pointer load, then operation) for random
// operations on the four custom opcodes and checks what the front end hands
// to the associative controller and to the DMA engine: operation code
// {custom number, funct[2:0]}, word size funct[6:3], pointers, length. The
// controller and DMA are replaced by responders that raise done a random
// number of cycles after start; the response must carry the error flag and
// the cycle count from start to done, and cmd_ready must stay low (busy
// high) for the whole operation. Also checks refused commands (unknown
// operation, transfers leaving the scratch-pad or of zero bytes), a pointer
// load that asks for a response, and that a response is held while
// resp_ready is low.
module tb_rocc_ctrl;
  import ap_pkg::*;

  localparam int unsigned XLEN = 64;
  localparam int unsigned SPM_BYTES = 1024;
  localparam int unsigned MAW = 32;
  localparam int unsigned LW = 16;
  localparam int unsigned SAW = $clog2(SPM_BYTES);

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, cmd_xd = 0;
  logic [6:0] cmd_opcode = '0, cmd_funct = '0;
  logic [4:0] cmd_rd = '0;
  logic [XLEN-1:0] cmd_rs1 = '0, cmd_rs2 = '0;
  logic resp_valid, resp_ready = 0;
  logic [4:0] resp_rd;
  logic [XLEN-1:0] resp_data;
  logic busy;
  logic ap_start;
  ap_op_e ap_op;
  logic [XLEN-1:0] ap_in_a, ap_in_b, ap_out, ap_len;
  logic [3:0] ap_ws;
  logic ap_done = 0, ap_err = 0;
  logic dma_start, dma_dir;
  logic [MAW-1:0] dma_mem_base;
  logic [SAW-1:0] dma_spm_base;
  logic [LW-1:0] dma_len;
  logic dma_done = 0;

  int checks = 0;
  int failures = 0;
  int n_ap_starts = 0, n_dma_starts = 0;

  rocc_ctrl #(.XLEN(XLEN), .SPM_BYTES(SPM_BYTES), .MAW(MAW), .LW(LW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Responders: done is sampled delay + 1 clock edges after the edge that
  // raises the start pulse, so the reported count must be delay + 1.
  int  delay = 1;
  bit  err_next = 0;
  always @(posedge clk) begin
    if (rst_n && ap_start) begin
      n_ap_starts++;
      fork begin
        repeat (delay - 1) @(posedge clk);
        @(negedge clk); ap_done = 1; ap_err = err_next;
        @(negedge clk); ap_done = 0; ap_err = 0;
      end join_none
    end
    if (rst_n && dma_start) begin
      n_dma_starts++;
      fork begin
        repeat (delay - 1) @(posedge clk);
        @(negedge clk); dma_done = 1;
        @(negedge clk); dma_done = 0;
      end join_none
    end
  end

  // Busy must be continuous from the command until the response is taken.
  task automatic send(input logic [6:0] opc, input logic [6:0] funct, input logic xd,
                      input logic [XLEN-1:0] rs1, input logic [XLEN-1:0] rs2);
    @(negedge clk);
    check(cmd_ready, "ready before a command");
    cmd_valid = 1; cmd_opcode = opc; cmd_funct = funct; cmd_xd = xd;
    cmd_rd = 5'($urandom); cmd_rs1 = rs1; cmd_rs2 = rs2;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  // Waits for the response (if any), holding resp_ready low for a while.
  task automatic get_resp(input logic [4:0] rd, output logic [XLEN-1:0] data);
    int hold;
    data = '0;
    while (!resp_valid) begin
      check(!cmd_ready && busy, "busy while waiting");
      @(negedge clk);
    end
    check(resp_rd == rd, "response register");
    hold = $urandom_range(3);
    data = resp_data;
    repeat (hold) begin
      @(negedge clk);
      check(resp_valid && resp_data == data, "response held");
    end
    resp_ready = 1;
    @(negedge clk);
    resp_ready = 0;
    check(!resp_valid && cmd_ready, "response taken");
  endtask

  function automatic logic [6:0] opcode_of(int x);
    unique case (x)
      0: return RISCV_CUSTOM0;
      1: return RISCV_CUSTOM1;
      2: return RISCV_CUSTOM2;
      default: return RISCV_CUSTOM3;
    endcase
  endfunction

  initial begin
    logic [XLEN-1:0] a, b, o, l, data;
    logic [4:0] rd;
    ap_op_e op;
    int x, f, ws;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cmd_ready && !busy && !resp_valid, "idle after reset");

    // Associative operations.
    for (int t = 0; t < 60; t++) begin
      do begin
        x = (t % 3 == 0) ? 2 : $urandom_range(3);
        f = $urandom_range(7, 1);
        op = ap_op_e'({2'(x), 3'(f)});
      end while (!is_assoc_op(op));
      ws = $urandom_range(15, 1);
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      o = {$urandom, $urandom}; l = {$urandom, $urandom};
      delay = $urandom_range(30, 1);
      err_next = ($urandom_range(4) == 0);
      send(opcode_of(x), 7'd0, 1'b0, a, b);
      check(!busy && cmd_ready, "pointer load needs no response");
      check(ap_in_a == a && ap_in_b == b, "pointer registers");
      send(opcode_of(x), {4'(ws), 3'(f)}, 1'b1, l, o);
      rd = cmd_rd;
      check(ap_op == op && ap_ws == 4'(ws) && ap_len == l && ap_out == o,
            $sformatf("operation registers: op %s ws %0d", ap_op.name(), ap_ws));
      get_resp(rd, data);
      check(data[XLEN-1] == err_next, "error flag");
      check(data[31:0] == 32'(delay + 1),
            $sformatf("cycle count %0d expected %0d", data[31:0], delay + 1));
    end
    check(n_ap_starts == 60, $sformatf("%0d operations started", n_ap_starts));

    // ADD is funct 1 on custom-2.
    send(RISCV_CUSTOM2, 7'd0, 1'b0, 64'h10, 64'h20);
    send(RISCV_CUSTOM2, {4'd1, 3'd1}, 1'b0, 64'd5, 64'h30);
    check(ap_op == OP_ADD && ap_ws == 4'd1, "custom-2 funct 1 is ADD");
    while (busy) @(negedge clk);

    // DMA transfers.
    for (int t = 0; t < 20; t++) begin
      bit st;
      int n, sp;
      int unsigned mp;
      st = 1'($urandom_range(1));
      n  = $urandom_range(SPM_BYTES, 1);
      sp = $urandom_range(SPM_BYTES - n);
      mp = $urandom;
      delay = $urandom_range(40, 1);
      send(RISCV_CUSTOM3, 7'd0, 1'b0, st ? 64'(sp) : 64'(mp), '0);
      send(RISCV_CUSTOM3, {4'd1, st ? 3'd7 : 3'd6}, 1'b1, 64'(n), st ? 64'(mp) : 64'(sp));
      rd = cmd_rd;
      check(dma_dir == st && dma_len == LW'(n) && dma_spm_base == SAW'(sp) &&
            dma_mem_base == MAW'(mp), "DMA registers");
      get_resp(rd, data);
      check(data[XLEN-1] == 1'b0 && data[31:0] == 32'(delay + 1), "DMA response");
    end
    check(n_dma_starts == 20, "DMA starts");

    // Refused commands: answered at once with the error flag, nothing starts.
    x = n_ap_starts + n_dma_starts;
    send(RISCV_CUSTOM3, 7'd0, 1'b0, 64'd1000, '0);
    send(RISCV_CUSTOM3, {4'd1, 3'd7}, 1'b1, 64'd100, 64'd0);          // leaves the SPM
    rd = cmd_rd;
    get_resp(rd, data);
    check(data[XLEN-1], "transfer beyond the scratch-pad refused");
    send(RISCV_CUSTOM3, {4'd1, 3'd6}, 1'b1, 64'd0, 64'd0);            // zero bytes
    rd = cmd_rd;
    get_resp(rd, data);
    check(data[XLEN-1], "empty transfer refused");
    send(RISCV_CUSTOM3, 7'd0, 1'b0, 64'h1_0000_0000, '0);
    send(RISCV_CUSTOM3, {4'd1, 3'd6}, 1'b1, 64'd4, 64'd0);            // memory address too wide
    rd = cmd_rd;
    get_resp(rd, data);
    check(data[XLEN-1], "memory address beyond the port refused");
    send(RISCV_CUSTOM3, {4'd1, 3'd0}, 1'b1, 64'd4, 64'd0);            // no such operation
    rd = cmd_rd;
    get_resp(rd, data);
    check(data[XLEN-1], "unknown operation refused");
    repeat (3) @(negedge clk);
    check(n_ap_starts + n_dma_starts == x, "refused commands start nothing");

    // A pointer load that asks for a response gets zero.
    send(RISCV_CUSTOM0, 7'd0, 1'b1, 64'd1, 64'd2);
    rd = cmd_rd;
    get_resp(rd, data);
    check(data == '0, "pointer load response");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
