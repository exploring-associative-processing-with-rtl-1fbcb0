// Lookup tables of the associative processor.
//
// A lookup table is the truth table of an associative operation, split into
// passes. Each pass names the logical columns to compare (A, B and R operand
// bits, the C flag, the M flag) with the values they must hold, and the
// columns to write, with their values, in every row that matched. The
// controller maps the logical columns onto physical CAM bit positions.
//
// Interface: purely combinational. `id` selects the table and `pass` the
// entry; `npasses` is the number of passes of the table.
//
// What follows the published tables: the XOR table (two passes, result
// pre-cleared), the AND, OR and NOT tables with their pre-written result
// vectors, the four-pass in-place addition on (carry, A, B) and its pass
// order, and the one-pass ReLU table (sign bit 1 and result bit 1 -> write 0).
// The addition table is printed with (carry=1, A=1, B=0) as its fourth
// compare pattern; that entry changes nothing, and carry=1, A=0, B=1 must
// become carry=1, B=0 for a correct sum, so this table uses the latter.
// The subtraction, in-place XOR/NOT (which use C as a one-bit marker),
// copy, shift and multiplication tables are this design's own, built the
// same way: every pass moves a row to a state that no later pass matches.
module ap_lut
  import ap_pkg::*;
(
  input  lut_id_e    id,
  input  logic [1:0] pass,
  output lut_entry_t entry,
  output logic [2:0] npasses
);

  // Column order in every 5-bit field: {M, C, R, B, A}.
  function automatic lut_entry_t e(logic [4:0] care, logic [4:0] val,
                                   logic [4:0] wcare, logic [4:0] wval);
    lut_entry_t r;
    r.care  = care;
    r.val   = val;
    r.wcare = wcare;
    r.wval  = wval;
    return r;
  endfunction

  always_comb begin
    entry   = e(5'b0, 5'b0, 5'b0, 5'b0);
    npasses = 3'd1;
    unique case (id)
      L_ADD: begin
        npasses = 3'd4;
        unique case (pass)
          2'd0: entry = e(5'b01110, 5'b00110, 5'b01100, 5'b01000); // C0 B1 R1 -> C1 R0
          2'd1: entry = e(5'b01110, 5'b00010, 5'b01100, 5'b00100); // C0 B1 R0 -> C0 R1
          2'd2: entry = e(5'b01110, 5'b01000, 5'b01100, 5'b00100); // C1 B0 R0 -> C0 R1
          default: entry = e(5'b01110, 5'b01100, 5'b01100, 5'b01000); // C1 B0 R1 -> C1 R0
        endcase
      end
      L_SUB: begin
        npasses = 3'd4;
        unique case (pass)
          2'd0: entry = e(5'b01110, 5'b00010, 5'b01100, 5'b01100); // W0 B1 R0 -> W1 R1
          2'd1: entry = e(5'b01110, 5'b00110, 5'b01100, 5'b00000); // W0 B1 R1 -> W0 R0
          2'd2: entry = e(5'b01110, 5'b01100, 5'b01100, 5'b00000); // W1 B0 R1 -> W0 R0
          default: entry = e(5'b01110, 5'b01000, 5'b01100, 5'b01100); // W1 B0 R0 -> W1 R1
        endcase
      end
      L_CPY: begin
        npasses = 3'd2;
        if (pass == 2'd0) entry = e(5'b00001, 5'b00001, 5'b00100, 5'b00100);
        else              entry = e(5'b00001, 5'b00000, 5'b00100, 5'b00000);
      end
      L_XOR_N: begin
        npasses = 3'd2;
        if (pass == 2'd0) entry = e(5'b00011, 5'b00001, 5'b00100, 5'b00100); // A1 B0 -> R1
        else              entry = e(5'b00011, 5'b00010, 5'b00100, 5'b00100); // A0 B1 -> R1
      end
      L_XOR_I: begin
        npasses = 3'd3;
        unique case (pass)
          2'd0: entry = e(5'b01110, 5'b00110, 5'b01100, 5'b01000); // C0 R1 B1 -> C1 R0
          2'd1: entry = e(5'b01110, 5'b00010, 5'b00100, 5'b00100); // C0 R0 B1 -> R1
          default: entry = e(5'b01000, 5'b01000, 5'b01000, 5'b00000); // C1 -> C0
        endcase
      end
      L_AND_N:  entry = e(5'b00011, 5'b00011, 5'b00100, 5'b00100); // A1 B1 -> R1
      L_AND_I:  entry = e(5'b00110, 5'b00100, 5'b00100, 5'b00000); // R1 B0 -> R0
      L_OR_N:   entry = e(5'b00011, 5'b00000, 5'b00100, 5'b00000); // A0 B0 -> R0
      L_OR_I:   entry = e(5'b00110, 5'b00010, 5'b00100, 5'b00100); // R0 B1 -> R1
      L_NOT_N:  entry = e(5'b00001, 5'b00000, 5'b00100, 5'b00100); // A0 -> R1
      L_NOT_I: begin
        npasses = 3'd3;
        unique case (pass)
          2'd0: entry = e(5'b01100, 5'b00000, 5'b01100, 5'b01100); // C0 R0 -> C1 R1
          2'd1: entry = e(5'b01100, 5'b00100, 5'b00100, 5'b00000); // C0 R1 -> R0
          default: entry = e(5'b01000, 5'b01000, 5'b01000, 5'b00000); // C1 -> C0
        endcase
      end
      L_SH_N:   entry = e(5'b00001, 5'b00001, 5'b00100, 5'b00100); // A1 -> R1
      L_ZERO_R: entry = e(5'b00000, 5'b00000, 5'b00100, 5'b00000); // -> R0
      L_MLOAD: begin
        npasses = 3'd2;
        if (pass == 2'd0) entry = e(5'b00001, 5'b00000, 5'b10000, 5'b00000); // A0 -> M0
        else              entry = e(5'b00001, 5'b00001, 5'b10100, 5'b10000); // A1 -> M1 R0
      end
      L_MADD: begin
        npasses = 3'd4;
        unique case (pass)
          2'd0: entry = e(5'b11110, 5'b10110, 5'b01100, 5'b01000); // M1 C0 R1 B1 -> C1 R0
          2'd1: entry = e(5'b11110, 5'b10010, 5'b01100, 5'b00100); // M1 C0 R0 B1 -> C0 R1
          2'd2: entry = e(5'b11110, 5'b11000, 5'b01100, 5'b00100); // M1 C1 R0 B0 -> C0 R1
          default: entry = e(5'b11110, 5'b11100, 5'b01100, 5'b01000); // M1 C1 R1 B0 -> C1 R0
        endcase
      end
      L_CCLR:   entry = e(5'b01000, 5'b01000, 5'b01000, 5'b00000); // C1 -> C0
      L_MCLR:   entry = e(5'b10000, 5'b10000, 5'b10000, 5'b00000); // M1 -> M0
      L_RELU:   entry = e(5'b00101, 5'b00101, 5'b00100, 5'b00000); // A1 R1 -> R0
      default: ;
    endcase
  end

endmodule
