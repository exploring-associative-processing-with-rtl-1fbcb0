// Self-checking testbench of ap_controller, driving a small ap_cam
// (32 rows x 8 bytes).
//
// The testbench owns the CAM row port while the controller is idle, writes
// random operand vectors into chosen rows and byte columns, starts an
// operation and, when done, reads the result back and compares it with the
// same operation computed here with ordinary arithmetic. Every operation is
// tried with a separate result and in place of each source. It also checks
// that rows outside the vector and the other operands are untouched, the
// pass count of each operation against its formula, that the time from
// start to done is passes + writes + 3 cycles, that an addition of zeros
// needs no write cycle, and that malformed commands are refused.
module tb_ap_controller;
  import ap_pkg::*;

  localparam int unsigned ROWS = 32;
  localparam int unsigned ROW_BYTES = 8;
  localparam int unsigned W = ROW_BYTES * 8 + 2;
  localparam int unsigned RAW = $clog2(ROWS);
  localparam int unsigned XLEN = 64;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  ap_op_e op = OP_NONE;
  logic [XLEN-1:0] in_a = '0, in_b = '0, out = '0, len = '0;
  logic [3:0] ws = '0;
  logic busy, done, err;
  logic [31:0] cnt_pass, cnt_write;
  logic cmp_en, wr_en, any_match;
  logic [W-1:0] cmp_mask, cmp_key, wr_mask, wr_data;
  logic [RAW-1:0] row_lo;
  logic [RAW:0] row_cnt;
  logic [RAW-1:0] c_raddr, c_waddr;
  logic c_we;
  logic [W-1:0] c_wmask, c_wdata, row_rdata;
  // testbench side of the row port
  logic [RAW-1:0] t_raddr = '0, t_waddr = '0;
  logic t_we = 0;
  logic [W-1:0] t_wmask = '0, t_wdata = '0;

  int checks = 0;
  int failures = 0;

  ap_controller #(.ROWS(ROWS), .ROW_BYTES(ROW_BYTES), .XLEN(XLEN)) dut (
    .clk, .rst_n, .start, .op, .in_a, .in_b, .out, .len, .ws,
    .busy, .done, .err, .cnt_pass, .cnt_write,
    .cmp_en, .cmp_mask, .cmp_key, .row_lo, .row_cnt,
    .wr_en, .wr_mask, .wr_data, .any_match,
    .row_raddr(c_raddr), .row_waddr(c_waddr), .row_we(c_we),
    .row_wmask(c_wmask), .row_wdata(c_wdata), .row_rdata
  );

  ap_cam #(.ROWS(ROWS), .ROW_BYTES(ROW_BYTES)) cam (
    .clk, .rst_n, .cmp_en, .cmp_mask, .cmp_key, .row_lo, .row_cnt,
    .wr_en, .wr_mask, .wr_data, .any_match, .tags(), .mask_q(), .key_q(),
    .row_raddr(busy ? c_raddr : t_raddr), .row_waddr(busy ? c_waddr : t_waddr),
    .row_we(busy ? c_we : t_we), .row_wmask(busy ? c_wmask : t_wmask),
    .row_wdata(busy ? c_wdata : t_wdata), .row_rdata
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [XLEN-1:0] addr(int row, int col);
    return XLEN'(col * ROWS + row);
  endfunction

  // Row port access by the testbench (controller idle).
  task automatic put(int row, int col, int nbytes, logic [127:0] v);
    @(negedge clk);
    t_we = 1; t_waddr = RAW'(row);
    t_wmask = ((W'(1) << (8 * nbytes)) - 1) << (8 * col);
    t_wdata = W'(v) << (8 * col);
    @(negedge clk);
    t_we = 0;
  endtask

  task automatic peek(int row, int col, int nbytes, output logic [127:0] v);
    t_raddr = RAW'(row);
    #1;
    v = 128'((row_rdata >> (8 * col)) & ((W'(1) << (8 * nbytes)) - 1));
  endtask

  int lat;
  task automatic run(ap_op_e o, logic [XLEN-1:0] a, logic [XLEN-1:0] b,
                     logic [XLEN-1:0] r, int n, int w);
    @(negedge clk);
    op = o; in_a = a; in_b = b; out = r; len = XLEN'(n); ws = 4'(w);
    start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
  endtask

  function automatic int passes(ap_op_e o, int w, bit inpl, int k);
    int n = 8 * w;
    unique case (o)
      OP_ADD, OP_SUB: return inpl ? 4 * n + 1 : 6 * n + 1;
      OP_XOR:  return inpl ? 3 * n : 2 * n + 1;
      OP_AND, OP_OR: return inpl ? n : n + 1;
      OP_NOT:  return inpl ? 3 * n : n + 1;
      OP_SHL, OP_SHR: return inpl ? 2 * n - 1 : n;
      OP_MULT: return inpl ? 2 * n * n + 5 * n + 1 : 2 * n * n + 5 * n + 2;
      OP_COPY: return k;
      default: return 1;
    endcase
  endfunction

  function automatic logic [127:0] ref_op(ap_op_e o, logic [127:0] a, logic [127:0] b,
                                          logic [127:0] r, int w);
    logic [127:0] m = (128'(1) << (8 * w)) - 1;
    unique case (o)
      OP_ADD:  return (a + b) & m;
      OP_SUB:  return (a - b) & m;
      OP_MULT: return (a * b) & m;
      OP_XOR:  return a ^ b;
      OP_AND:  return a & b;
      OP_OR:   return a | b;
      OP_NOT:  return ~a & m;
      OP_SHL:  return (a << 1) & m;
      OP_SHR:  return a >> 1;
      OP_RELU: return a[8 * w - 1] ? (r & ~128'(1)) : r;
      default: return r;
    endcase
  endfunction

  // mode 0: separate result, 1: result in place of A, 2: result in place of B
  task automatic test_op(ap_op_e o, int w, int mode);
    int row0, n, ca, cb, cr;
    logic [127:0] va [ROWS], vb [ROWS], vr [ROWS], got, expv, other;
    logic [127:0] m;
    bit inpl;
    m = (128'(1) << (8 * w)) - 1;
    n = $urandom_range(ROWS - 1, 1);
    row0 = $urandom_range(ROWS - n);
    ca = 0; cb = w; cr = 2 * w;
    if (mode == 1) cr = ca;
    if (mode == 2) cr = cb;
    if (o == OP_RELU) cr = cb;
    inpl = (mode != 0);
    for (int i = 0; i < ROWS; i++) begin
      va[i] = {$urandom, $urandom, $urandom, $urandom} & m;
      vb[i] = {$urandom, $urandom, $urandom, $urandom} & m;
      if (o == OP_MULT && i % 3 == 0) va[i] = m;          // large operands
      vr[i] = {$urandom, $urandom, $urandom, $urandom} & m;
      if (o == OP_RELU) vr[i] = 1;                         // pre-written ones
      put(i, ca, w, va[i]);
      put(i, cb, w, vb[i]);
      if (mode == 0) put(i, cr, w, vr[i]);
    end
    if (mode == 1) vr = va;
    if (mode == 2) vr = vb;
    run(o, addr(row0, ca), addr(row0, cb), addr(row0, cr), n, w);
    check(!err, $sformatf("%s ws=%0d mode=%0d refused", o.name(), w, mode));
    check(int'(cnt_pass) == passes(o, w, inpl, n),
          $sformatf("%s ws=%0d mode=%0d: %0d passes, expected %0d", o.name(), w, mode,
                    cnt_pass, passes(o, w, inpl, n)));
    check(lat == int'(cnt_pass + cnt_write) + 3,
          $sformatf("%s latency %0d, passes %0d writes %0d", o.name(), lat, cnt_pass, cnt_write));
    check(cnt_write <= cnt_pass, "writes <= passes");
    for (int i = 0; i < ROWS; i++) begin
      peek(i, cr, w, got);
      if (i >= row0 && i < row0 + n) expv = ref_op(o, va[i], vb[i], vr[i], w);
      else expv = vr[i];
      check(got == expv, $sformatf("%s ws=%0d mode=%0d row %0d: got %h expected %h (a=%h b=%h)",
                                   o.name(), w, mode, i, got, expv, va[i], vb[i]));
      // the source that is not the result is untouched
      if (mode != 2 && o != OP_RELU) begin
        peek(i, cb, w, other);
        check(other == vb[i], $sformatf("%s B untouched row %0d", o.name(), i));
      end
      if (mode == 2) begin
        peek(i, ca, w, other);
        check(other == va[i], $sformatf("%s A untouched row %0d", o.name(), i));
      end
    end
  endtask

  initial begin
    logic [127:0] got;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int w = 1; w <= 2; w++) begin
      test_op(OP_ADD, w, 0); test_op(OP_ADD, w, 1); test_op(OP_ADD, w, 2);
      test_op(OP_SUB, w, 0); test_op(OP_SUB, w, 1);
      test_op(OP_XOR, w, 0); test_op(OP_XOR, w, 1); test_op(OP_XOR, w, 2);
      test_op(OP_AND, w, 0); test_op(OP_AND, w, 1); test_op(OP_AND, w, 2);
      test_op(OP_OR,  w, 0); test_op(OP_OR,  w, 1); test_op(OP_OR,  w, 2);
      test_op(OP_NOT, w, 0); test_op(OP_NOT, w, 1);
      test_op(OP_SHL, w, 0); test_op(OP_SHL, w, 1);
      test_op(OP_SHR, w, 0); test_op(OP_SHR, w, 1);
      test_op(OP_MULT, w, 0); test_op(OP_MULT, w, 1); test_op(OP_MULT, w, 2);
    end
    test_op(OP_RELU, 4, 0);
    test_op(OP_RELU, 1, 0);

    // SET: one pass, one write.
    run(OP_SET, 64'h5A, '0, addr(3, 5), 10, 1);
    check(!err && cnt_pass == 1 && cnt_write == 1, "SET passes/writes");
    for (int i = 0; i < ROWS; i++) begin
      peek(i, 5, 1, got);
      if (i >= 3 && i < 13) check(got == 128'h5A, $sformatf("SET row %0d", i));
    end

    // COPY: k cycles, across rows.
    for (int i = 0; i < 6; i++) put(20 + i, 1, 2, 128'(16'hA000 + i));
    run(OP_COPY, addr(20, 1), '0, addr(2, 6), 6, 2);
    check(!err && cnt_pass == 6, $sformatf("COPY cycles %0d", cnt_pass));
    for (int i = 0; i < 6; i++) begin
      peek(2 + i, 6, 2, got);
      check(got == 128'(16'hA000 + i), $sformatf("COPY element %0d got %h", i, got));
    end

    // Addition of zeros: the first run may clear carries left by earlier
    // operations; in the second no row ever matches, so no write cycle.
    for (int i = 0; i < ROWS; i++) begin put(i, 0, 1, 0); put(i, 1, 1, 0); end
    run(OP_ADD, addr(0, 0), addr(0, 1), addr(0, 0), ROWS, 1);
    run(OP_ADD, addr(0, 0), addr(0, 1), addr(0, 0), ROWS, 1);
    check(cnt_pass == 33 && cnt_write == 0 && lat == 36,
          $sformatf("ADD of zeros: %0d passes %0d writes latency %0d", cnt_pass, cnt_write, lat));

    // Refused commands.
    run(OP_ADD, addr(0, 0), addr(1, 1), addr(0, 2), 4, 1);
    check(err, "operands on different rows refused");
    run(OP_ADD, addr(0, 0), addr(0, 1), addr(0, 2), 0, 1);
    check(err, "zero length refused");
    run(OP_SUB, addr(0, 0), addr(0, 1), addr(0, 1), 4, 1);
    check(err, "SUB into second operand refused");
    run(OP_ADD, addr(0, 0), addr(0, 1), addr(0, 7), 4, 2);
    check(err, "field outside the row refused");
    run(OP_XOR, addr(0, 0), addr(0, 2), addr(0, 1), 4, 2);
    check(err, "partially overlapping fields refused");
    run(OP_ADD, addr(30, 0), addr(30, 1), addr(30, 2), 4, 1);
    check(err, "vector past the last row refused");
    run(OP_NONE, addr(0, 0), addr(0, 1), addr(0, 2), 4, 1);
    check(err, "unknown operation refused");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
