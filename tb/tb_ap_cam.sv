// Self-checking testbench of ap_cam, at a reduced size (16 rows x 2 bytes).
//
// Fills the rows through the row port, then runs random masked compares
// over random row windows and checks every tag, any_match and the Mask/Key
// registers against a model kept in the testbench; after each compare it
// performs a masked parallel write and checks every row (data and both flag
// columns) against the model. A compare takes effect at the clock edge, the
// write one cycle later, as the controller uses them.
module tb_ap_cam;
  localparam int unsigned ROWS = 16;
  localparam int unsigned ROW_BYTES = 2;
  localparam int unsigned W = ROW_BYTES * 8 + 2;
  localparam int unsigned RAW = $clog2(ROWS);

  logic clk = 0, rst_n = 0;
  logic cmp_en = 0, wr_en = 0, row_we = 0;
  logic [W-1:0] cmp_mask = '0, cmp_key = '0, wr_mask = '0, wr_data = '0;
  logic [W-1:0] row_wmask = '0, row_wdata = '0, row_rdata;
  logic [RAW-1:0] row_lo = '0, row_raddr = '0, row_waddr = '0;
  logic [RAW:0] row_cnt = '0;
  logic any_match;
  logic [ROWS-1:0] tags;
  logic [W-1:0] mask_q, key_q;

  int checks = 0;
  int failures = 0;
  logic [W-1:0] model [ROWS];
  logic [ROWS-1:0] exp_tags;

  ap_cam #(.ROWS(ROWS), .ROW_BYTES(ROW_BYTES)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] rnd;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // Flags are reset; fill data (and flags) through the row port.
    for (int r = 0; r < ROWS; r++) begin
      rnd = W'({$urandom, $urandom});
      row_we = 1; row_waddr = RAW'(r); row_wmask = '1; row_wdata = rnd;
      model[r] = rnd;
      @(negedge clk);
    end
    row_we = 0;
    for (int r = 0; r < ROWS; r++) begin
      row_raddr = RAW'(r);
      #1;
      check(row_rdata == model[r], $sformatf("row read %0d", r));
    end
    @(negedge clk);
    // Partial row write through the row port.
    row_we = 1; row_waddr = 3; row_wmask = W'(18'h0FF00); row_wdata = W'(18'h3A5C3);
    model[3] = (model[3] & ~W'(18'h0FF00)) | (W'(18'h3A5C3) & W'(18'h0FF00));
    @(negedge clk);
    row_we = 0;
    row_raddr = 3; #1;
    check(row_rdata == model[3], $sformatf("partial row write %h %h", row_rdata, model[3]));

    for (int t = 0; t < 200; t++) begin
      int lo, cnt;
      lo  = $urandom_range(ROWS - 1);
      cnt = $urandom_range(ROWS - lo);
      // Few mask bits so that matches are frequent.
      cmp_mask = W'(1) << $urandom_range(W - 1);
      if ($urandom_range(1) != 0) cmp_mask |= W'(1) << $urandom_range(W - 1);
      if (t % 17 == 0) cmp_mask = '0;
      cmp_key = W'({$urandom, $urandom});
      row_lo = RAW'(lo); row_cnt = (RAW+1)'(cnt);
      cmp_en = 1;
      for (int r = 0; r < ROWS; r++)
        exp_tags[r] = (r >= lo) && (r < lo + cnt) && (((model[r] ^ cmp_key) & cmp_mask) == '0);
      @(negedge clk);
      cmp_en = 0;
      check(tags == exp_tags, $sformatf("tags %b expected %b", tags, exp_tags));
      check(any_match == (exp_tags != '0), "any_match");
      check(mask_q == cmp_mask && key_q == cmp_key, "mask/key registers");
      // Parallel write into the tagged rows.
      wr_mask = W'({$urandom, $urandom});
      wr_data = W'({$urandom, $urandom});
      wr_en = 1;
      for (int r = 0; r < ROWS; r++)
        if (exp_tags[r]) model[r] = (model[r] & ~wr_mask) | (wr_data & wr_mask);
      @(negedge clk);
      wr_en = 0;
      for (int r = 0; r < ROWS; r++) begin
        row_raddr = RAW'(r);
        #1;
        check(row_rdata == model[r], $sformatf("row %0d after parallel write", r));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
