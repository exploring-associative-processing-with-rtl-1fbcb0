// Self-checking testbench of ap_lut.
//
// For every lookup table and every starting value of the five logical
// columns (A, B, R, C, M) it plays the table's passes in order on one row,
// the way the CAM does (compare the cared columns, write the write columns
// on a match), and compares the final row with the function the table must
// compute, worked out here with ordinary arithmetic. Starting states that a
// table does not accept (result not pre-cleared, flag not clear) are
// skipped. Also checks each table's pass count.
module tb_ap_lut;
  import ap_pkg::*;

  lut_id_e    id;
  logic [1:0] pass;
  lut_entry_t entry;
  logic [2:0] npasses;

  int checks = 0;
  int failures = 0;

  ap_lut dut (.id, .pass, .entry, .npasses);

  // Play all passes of table t on state s (bits {M,C,R,B,A}).
  task automatic run_table(input lut_id_e t, input logic [4:0] s, output logic [4:0] r);
    r = s;
    id = t;
    pass = 2'd0;
    #1;
    for (int p = 0; p < int'(npasses); p++) begin
      pass = 2'(p);
      #1;
      if (((r ^ entry.val) & entry.care) == 5'b0)
        r = (r & ~entry.wcare) | (entry.wval & entry.wcare);
    end
  endtask

  function automatic bit accepts(lut_id_e t, logic [4:0] s);
    logic a, b, rr, c, m;
    {m, c, rr, b, a} = s;
    unique case (t)
      L_XOR_N, L_AND_N, L_NOT_N, L_SH_N: return rr == 1'b0;
      L_OR_N: return rr == 1'b1;
      L_XOR_I, L_NOT_I: return c == 1'b0;
      L_MADD: return m || !c;
      default: return 1'b1;
    endcase
  endfunction

  function automatic logic [4:0] expect_of(lut_id_e t, logic [4:0] s);
    logic a, b, rr, c, m;
    logic [1:0] sum;
    {m, c, rr, b, a} = s;
    unique case (t)
      L_ADD:   begin sum = 2'(rr) + 2'(b) + 2'(c); rr = sum[0]; c = sum[1]; end
      L_SUB:   begin sum = 2'(rr) - 2'(b) - 2'(c); c = (int'(rr) < int'(b) + int'(c)); rr = sum[0]; end
      L_CPY:   rr = a;
      L_XOR_N: rr = a ^ b;
      L_XOR_I: rr = rr ^ b;
      L_AND_N: rr = a & b;
      L_AND_I: rr = rr & b;
      L_OR_N:  rr = a | b;
      L_OR_I:  rr = rr | b;
      L_NOT_N: rr = ~a;
      L_NOT_I: rr = ~rr;
      L_SH_N:  rr = a;
      L_ZERO_R: rr = 1'b0;
      L_MLOAD: begin m = a; if (a) rr = 1'b0; end
      L_MADD:  if (m) begin sum = 2'(rr) + 2'(b) + 2'(c); rr = sum[0]; c = sum[1]; end
      L_CCLR:  c = 1'b0;
      L_MCLR:  m = 1'b0;
      L_RELU:  if (a && rr) rr = 1'b0;
      default: ;
    endcase
    return {m, c, rr, b, a};
  endfunction

  function automatic int passes_of(lut_id_e t);
    unique case (t)
      L_ADD, L_SUB, L_MADD: return 4;
      L_XOR_I, L_NOT_I: return 3;
      L_CPY, L_XOR_N, L_MLOAD: return 2;
      default: return 1;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] got, exp;
    lut_id_e t;
    for (int ti = 0; ti <= int'(L_RELU); ti++) begin
      t = lut_id_e'(ti);
      id = t; pass = 2'd0; #1;
      checks++;
      if (int'(npasses) != passes_of(t)) begin
        failures++;
        $display("FAIL %s: %0d passes, expected %0d", t.name(), npasses, passes_of(t));
      end
      for (int s = 0; s < 32; s++) begin
        if (!accepts(t, 5'(s))) continue;
        run_table(t, 5'(s), got);
        exp = expect_of(t, 5'(s));
        checks++;
        if (got !== exp) begin
          failures++;
          $display("FAIL %s state %b: got %b expected %b", t.name(), 5'(s), got, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
