// End-to-end self-checking testbench of rva_top at its default size
// (512 rows x 32 bytes, 16 KB scratch-pad).
//
// The testbench plays the host core: it issues RoCC instruction pairs,
// reads and writes scratch-pad bytes through the load/store port, and models
// main memory behind the DMA port (a grant every cycle, read data one cycle
// later). It runs the flow of the document's workloads:
//   - DMA loads of two 512-element byte vectors from main memory;
//   - every associative operation on them (ADD, SUB, MULT, XOR, AND, OR,
//     NOT, SHL, SHR), each result stored back by DMA and compared with
//     ordinary arithmetic;
//   - COPY, an in-place ADD, SET and a ReLU (vector pre-set to one, then the
//     ReLU table), an operation on a window of rows, and a 32-bit ADD
//     through core stores and loads;
//   - a 3x3 matrix product in the source algorithm's order: SET a buffer
//     to one element of A, MULT it by a row of B, ADD it into a row of C;
//   - refused commands answered with the error flag, and core accesses
//     refused while an operation runs.
// Each response's cycle count is checked: passes + writes + 4 for an
// associative operation (elements + 3 for COPY), and 11 + length + 2
// (store) or + 3 (load) for a DMA transfer. Every mechanism is counted and the test fails if one never
// happened.
module tb_rva_top;
  import ap_pkg::*;

  localparam int unsigned ROWS = AP_ROWS;
  localparam int unsigned XLEN = 64;
  localparam int unsigned SAW = $clog2(AP_ROWS * AP_ROW_BYTES);
  localparam int unsigned MEMB = 1 << 16;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready, cmd_xd = 0;
  logic [6:0] cmd_opcode = '0, cmd_funct = '0;
  logic [4:0] cmd_rd = '0;
  logic [XLEN-1:0] cmd_rs1 = '0, cmd_rs2 = '0;
  logic resp_valid, resp_ready = 0;
  logic [4:0] resp_rd;
  logic [XLEN-1:0] resp_data;
  logic busy;
  logic spm_req = 0, spm_we = 0, spm_gnt;
  logic [SAW-1:0] spm_addr = '0;
  logic [7:0] spm_wdata = '0, spm_rdata;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr;
  logic [7:0] mem_wdata, mem_rdata;
  logic [31:0] ap_cnt_pass, ap_cnt_write;

  rva_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- memory
  logic [7:0] mem [MEMB];
  logic       rv_q = 1'b0;
  logic [7:0] rd_q = '0;
  assign mem_gnt    = 1'b1;
  assign mem_rvalid = rv_q;
  assign mem_rdata  = rd_q;
  always @(posedge clk) begin
    rv_q <= 1'b0;
    if (rst_n && mem_req) begin
      if (mem_we) mem[16'(mem_addr)] <= mem_wdata;
      else begin
        rv_q <= 1'b1;
        rd_q <= mem[16'(mem_addr)];
      end
    end
  end

  // ------------------------------------------------------------ mechanisms
  int n_dma_load = 0, n_dma_store = 0, n_cpu_rd = 0, n_cpu_wr = 0;
  int n_err = 0, n_cpu_refused = 0, n_skip_write = 0, n_matmul = 0;
  int n_op [ap_op_e];

  // ------------------------------------------------------------------ core
  function automatic int addr(int row, int col);
    return col * ROWS + row;
  endfunction

  task automatic cpu_wr(int a, logic [7:0] d);
    @(negedge clk);
    check(spm_gnt, "scratch-pad free for a store");
    spm_req = 1; spm_we = 1; spm_addr = SAW'(a); spm_wdata = d;
    @(negedge clk);
    spm_req = 0; spm_we = 0;
    n_cpu_wr++;
  endtask

  task automatic cpu_rd(int a, output logic [7:0] d);
    @(negedge clk);
    spm_req = 1; spm_we = 0; spm_addr = SAW'(a);
    @(negedge clk);
    spm_req = 0;
    d = spm_rdata;
    n_cpu_rd++;
  endtask

  function automatic logic [6:0] opcode_of(logic [1:0] x);
    unique case (x)
      2'd0: return RISCV_CUSTOM0;
      2'd1: return RISCV_CUSTOM1;
      2'd2: return RISCV_CUSTOM2;
      default: return RISCV_CUSTOM3;
    endcase
  endfunction

  task automatic send(input logic [6:0] opc, input logic [6:0] funct, input logic xd,
                      input logic [XLEN-1:0] rs1, input logic [XLEN-1:0] rs2);
    @(negedge clk);
    check(cmd_ready, "ready for a command");
    cmd_valid = 1; cmd_opcode = opc; cmd_funct = funct; cmd_xd = xd;
    cmd_rd = 5'd10; cmd_rs1 = rs1; cmd_rs2 = rs2;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic get_resp(output logic [XLEN-1:0] data);
    while (!resp_valid) @(negedge clk);
    data = resp_data;
    check(resp_rd == 5'd10, "response register");
    resp_ready = 1;
    @(negedge clk);
    resp_ready = 0;
  endtask

  // Issues the two instructions of operation o and returns the response.
  task automatic issue(ap_op_e o, int w, longint a, longint b, longint r, longint n,
                       output logic [XLEN-1:0] resp);
    logic [4:0] code;
    code = 5'(o);
    send(opcode_of(code[4:3]), 7'd0, 1'b0, XLEN'(a), XLEN'(b));
    send(opcode_of(code[4:3]), {4'(w), code[2:0]}, 1'b1, XLEN'(n), XLEN'(r));
  endtask

  task automatic ap(ap_op_e o, int w, int a, int b, int r, int n, output logic [XLEN-1:0] resp);
    issue(o, w, longint'(a), longint'(b), longint'(r), longint'(n), resp);
    get_resp(resp);
    check(!resp[XLEN-1], $sformatf("%s accepted", o.name()));
    check(resp[31:0] == ap_cnt_pass + ap_cnt_write + ((o == OP_COPY) ? 32'd3 : 32'd4),
          $sformatf("%s: %0d cycles for %0d passes and %0d writes", o.name(), resp[31:0],
                    ap_cnt_pass, ap_cnt_write));
    if (ap_cnt_write < ap_cnt_pass) n_skip_write++;
    if (!resp[XLEN-1]) n_op[o] = n_op.exists(o) ? n_op[o] + 1 : 1;
  endtask

  task automatic dma(bit store, int mem_a, int spm_a, int n);
    logic [XLEN-1:0] resp;
    send(RISCV_CUSTOM3, 7'd0, 1'b0, XLEN'(store ? spm_a : mem_a), '0);
    send(RISCV_CUSTOM3, {4'd1, store ? 3'd7 : 3'd6}, 1'b1, XLEN'(n), XLEN'(store ? mem_a : spm_a));
    get_resp(resp);
    check(!resp[XLEN-1], "DMA accepted");
    check(resp[31:0] == 32'(11 + n + (store ? 2 : 3)),
          $sformatf("DMA %s of %0d bytes: %0d cycles", store ? "store" : "load", n, resp[31:0]));
    if (store) n_dma_store++; else n_dma_load++;
  endtask

  function automatic int passes8(ap_op_e o, bit inpl);
    unique case (o)
      OP_ADD, OP_SUB: return inpl ? 33 : 49;
      OP_XOR:  return inpl ? 24 : 17;
      OP_AND, OP_OR: return inpl ? 8 : 9;
      OP_NOT:  return inpl ? 24 : 9;
      OP_SHL, OP_SHR: return inpl ? 15 : 8;
      OP_MULT: return inpl ? 169 : 170;
      default: return 1;
    endcase
  endfunction

  function automatic logic [7:0] ref8(ap_op_e o, logic [7:0] a, logic [7:0] b);
    unique case (o)
      OP_ADD:  return a + b;
      OP_SUB:  return a - b;
      OP_MULT: return 8'(a * b);
      OP_XOR:  return a ^ b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_NOT:  return ~a;
      OP_SHL:  return a << 1;
      OP_SHR:  return a >> 1;
      default: return 8'h00;
    endcase
  endfunction

  // ------------------------------------------------------------------ test
  logic [7:0] va [ROWS], vb [ROWS];

  initial begin
    logic [XLEN-1:0] resp;
    logic [7:0] d;
    ap_op_e ops [9];
    int bad;
    ops = '{OP_ADD, OP_SUB, OP_MULT, OP_XOR, OP_AND, OP_OR, OP_NOT, OP_SHL, OP_SHR};

    for (int i = 0; i < MEMB; i++) mem[i] = 8'($urandom);
    for (int i = 0; i < ROWS; i++) begin
      va[i] = mem[i];
      vb[i] = mem[1024 + i];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(cmd_ready && !busy && spm_gnt, "idle after reset");

    // Operand vectors into byte columns 0 and 1 of all rows.
    dma(1'b0, 0, addr(0, 0), ROWS);
    dma(1'b0, 1024, addr(0, 1), ROWS);

    // Every operation with a separate result in column 2, stored back.
    foreach (ops[k]) begin
      ap(ops[k], 1, addr(0, 0), addr(0, 1), addr(0, 2), ROWS, resp);
      check(ap_cnt_pass == 32'(passes8(ops[k], 1'b0)),
            $sformatf("%s: %0d passes", ops[k].name(), ap_cnt_pass));
      dma(1'b1, 8192 + 1024 * k, addr(0, 2), ROWS);
      bad = 0;
      for (int i = 0; i < ROWS; i++)
        if (mem[8192 + 1024 * k + i] !== ref8(ops[k], va[i], vb[i])) bad++;
      check(bad == 0, $sformatf("%s: %0d of %0d elements wrong", ops[k].name(), bad, ROWS));
    end

    // COPY column 0 to column 4 (k cycles), then ADD column 1 in place.
    ap(OP_COPY, 1, addr(0, 0), 0, addr(0, 4), ROWS, resp);
    check(ap_cnt_pass == ROWS, "COPY takes one cycle per element");
    ap(OP_ADD, 1, addr(0, 4), addr(0, 1), addr(0, 4), ROWS, resp);
    check(ap_cnt_pass == 32'(passes8(OP_ADD, 1'b1)), "in-place ADD passes");
    bad = 0;
    for (int i = 0; i < ROWS; i += 7) begin
      cpu_rd(addr(i, 4), d);
      if (d !== 8'(va[i] + vb[i])) bad++;
    end
    check(bad == 0, "COPY then in-place ADD");

    // ReLU: the result vector is set to one, then cleared where A < 0.
    ap(OP_SET, 1, 1, 0, addr(0, 5), ROWS, resp);
    ap(OP_RELU, 1, addr(0, 0), 0, addr(0, 5), ROWS, resp);
    check(ap_cnt_pass == 1, "ReLU is one pass");
    bad = 0;
    for (int i = 0; i < ROWS; i++) begin
      cpu_rd(addr(i, 5), d);
      if (d !== (va[i][7] ? 8'd0 : 8'd1)) bad++;
    end
    check(bad == 0, $sformatf("ReLU: %0d elements wrong", bad));

    // A window of rows: XOR on rows 10..19 only.
    ap(OP_SET, 1, 'h77, 0, addr(0, 6), ROWS, resp);
    ap(OP_XOR, 1, addr(10, 0), addr(10, 1), addr(10, 6), 10, resp);
    cpu_rd(addr(9, 6), d);  check(d == 8'h77, "row before the window untouched");
    cpu_rd(addr(20, 6), d); check(d == 8'h77, "row after the window untouched");
    cpu_rd(addr(10, 6), d); check(d == (va[10] ^ vb[10]), "first row of the window");
    cpu_rd(addr(19, 6), d); check(d == (va[19] ^ vb[19]), "last row of the window");

    // 32-bit ADD over 32 elements written by core stores.
    begin
      logic [31:0] x [32], y [32], z;
      for (int i = 0; i < 32; i++) begin
        x[i] = $urandom; y[i] = $urandom;
        for (int b = 0; b < 4; b++) begin
          cpu_wr(addr(i, 8 + b), x[i][8 * b +: 8]);
          cpu_wr(addr(i, 12 + b), y[i][8 * b +: 8]);
        end
      end
      ap(OP_ADD, 4, addr(0, 8), addr(0, 12), addr(0, 16), 32, resp);
      check(ap_cnt_pass == 32'(6 * 32 + 1), "32-bit ADD passes");
      bad = 0;
      for (int i = 0; i < 32; i++) begin
        for (int b = 0; b < 4; b++) begin
          cpu_rd(addr(i, 16 + b), d);
          z[8 * b +: 8] = d;
        end
        if (z !== x[i] + y[i]) bad++;
      end
      check(bad == 0, $sformatf("32-bit ADD: %0d elements wrong", bad));
    end

    // 3x3 matrix product in the loop order of the source algorithm: for each
    // i and j, SET a buffer to A[i][j], MULT it in place by row j of B, ADD it
    // in place into row i of C. Rows of B and C are 3-element vectors kept in
    // byte columns of their own (B row j in column 21+j, C row i in column
    // 24+i, the buffer in column 20), all starting on CAM row 0.
    begin
      logic [7:0] ma [3][3], mb [3][3], mc [3][3];
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          ma[i][j] = 8'($urandom); mb[i][j] = 8'($urandom); mc[i][j] = 8'd0;
          cpu_wr(addr(j, 21 + i), mb[i][j]);
        end
      for (int i = 0; i < 3; i++) ap(OP_SET, 1, 0, 0, addr(0, 24 + i), 3, resp);
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++) begin
          ap(OP_SET, 1, int'(ma[i][j]), 0, addr(0, 20), 3, resp);
          ap(OP_MULT, 1, addr(0, 20), addr(0, 21 + j), addr(0, 20), 3, resp);
          ap(OP_ADD, 1, addr(0, 24 + i), addr(0, 20), addr(0, 24 + i), 3, resp);
          for (int c = 0; c < 3; c++) mc[i][c] += 8'(ma[i][j] * mb[j][c]);
        end
      bad = 0;
      for (int i = 0; i < 3; i++)
        for (int c = 0; c < 3; c++) begin
          cpu_rd(addr(c, 24 + i), d);
          if (d !== mc[i][c]) bad++;
        end
      check(bad == 0, $sformatf("matrix product: %0d elements wrong", bad));
      if (bad == 0) n_matmul++;
    end

    // Refused commands.
    // no word size
    issue(OP_ADD, 0, longint'(addr(0, 0)),
          longint'(addr(0, 1)), longint'(addr(0, 2)), longint'(10), resp);
    get_resp(resp);
    check(resp[XLEN-1], "word size 0 refused");
    if (resp[XLEN-1]) n_err++;
    // rows differ
    issue(OP_ADD, 1, longint'(addr(0, 0)),
          longint'(addr(5, 1)), longint'(addr(0, 2)), longint'(10), resp);
    get_resp(resp);
    check(resp[XLEN-1], "operands on different rows refused");
    if (resp[XLEN-1]) n_err++;
    // leaves the SPM
    issue(OP_DMALD, 1, longint'(0), longint'(0), longint'(addr(400, 31)), longint'(200), resp);
    get_resp(resp);
    check(resp[XLEN-1], "transfer beyond the scratch-pad refused");
    if (resp[XLEN-1]) n_err++;

    // Core access while an operation runs: not granted, memory unchanged.
    cpu_wr(addr(7, 30), 8'h3C);
    issue(OP_MULT, 1, longint'(addr(0, 0)), longint'(addr(0, 1)), longint'(addr(0, 29)), longint'(ROWS), resp);
    repeat (5) begin
      @(negedge clk);
      spm_req = 1; spm_we = 1; spm_addr = SAW'(addr(7, 30)); spm_wdata = 8'hC3;
      #1;
      check(!spm_gnt && busy, "core store held off during an operation");
      if (!spm_gnt) n_cpu_refused++;
    end
    @(negedge clk);
    spm_req = 0; spm_we = 0;
    get_resp(resp);
    check(!resp[XLEN-1], "operation after refused accesses");
    cpu_rd(addr(7, 30), d);
    check(d == 8'h3C, "refused store had no effect");
    cpu_rd(addr(7, 29), d);
    check(d == ref8(OP_MULT, va[7], vb[7]), "product beside refused accesses");

    // Every mechanism must have happened.
    check(n_dma_load > 0, "DMA loads");
    check(n_dma_store > 0, "DMA stores");
    check(n_cpu_rd > 0 && n_cpu_wr > 0, "core loads and stores");
    foreach (ops[k]) check(n_op.exists(ops[k]), $sformatf("%s used", ops[k].name()));
    check(n_op.exists(OP_COPY) && n_op.exists(OP_SET) && n_op.exists(OP_RELU),
          "COPY, SET and ReLU used");
    check(n_err == 3, "error responses");
    check(n_cpu_refused == 5, "core accesses refused while busy");
    check(n_skip_write > 0, "passes without a write cycle");
    check(n_matmul == 1, "matrix product");
    $display("mechanisms: dma_load=%0d dma_store=%0d cpu_rd=%0d cpu_wr=%0d ops=%0d err=%0d refused=%0d skipped_writes=%0d matmul=%0d",
             n_dma_load, n_dma_store, n_cpu_rd, n_cpu_wr, n_op.size(), n_err, n_cpu_refused,
             n_skip_write, n_matmul);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
