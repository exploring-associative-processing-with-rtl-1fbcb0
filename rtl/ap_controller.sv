// Controller of the associative processor.
//
// It runs the generic associative algorithm: for every bit of the operands
// it selects the columns (mask), for every pass of the operation's lookup
// table it sets the key and triggers a parallel compare; when at least one
// row matched, the next cycle writes the table's write bits into all tagged
// rows. A pass therefore costs one compare cycle plus, only if some row
// matched, one write cycle, and an operation takes passes + writes cycles
// whatever the vector length. cnt_pass and cnt_write count both for the last
// operation.
//
// Operands are scratch-pad byte addresses; address a is row a % ROWS, byte
// column a / ROWS. Element i of a vector is in row row0+i, bytes col0 ..
// col0+ws-1 (little-endian). The two sources and the result of a parallel
// operation must start on the same row; the operation works on rows
// row0 .. row0+len-1.
//
// Operations and passes for an n-bit word (n = 8*ws):
//   ADD, SUB : 4 passes per bit, result in place of the first operand (ADD
//              also in place of the second); one more pass clears the carry.
//              A separate result is first filled with A by 2 passes per bit.
//   XOR      : result pre-cleared + 2 passes per bit, or 3 per bit in place.
//   AND, OR  : result pre-cleared (AND) or pre-set to ones (OR) + 1 pass per
//              bit, or 1 pass per bit in place.
//   NOT      : pre-cleared + 1 pass per bit, or 3 per bit in place.
//   SHL, SHR : shift by one bit, logical: n passes, 2n-1 in place.
//   MULT     : n-bit truncated product, shift-and-add from the most
//              significant multiplier bit: per multiplier bit i, 2 passes
//              load it into the M column, 4 passes per product bit add B
//              into R bits i..n-1, 1 pass clears the carry; 1 final pass
//              clears M. In place of either source.
//   RELU     : 1 pass: where A's sign bit is 1 and R's bit 0 is 1 (R was
//              filled with ones), write R bit 0 = 0.
//   SET      : 1 pass writes imm into the result field of every row.
//   COPY     : element by element through the row port, one cycle each;
//              source and destination rows may differ.
// The algorithm, the compare-then-write timing, the XOR/AND/OR/NOT/ADD/ReLU
// tables, SET and the k-cycle COPY follow the document. Its pass count for
// multiplication is 4n^2; this n-bit truncated multiplier needs 2n^2+5n+1.
// The operand layout, the in-place variants, the carry-clearing pass and the
// SUB, shift and multiplication tables are this design's own.
//
// Interface: start (one cycle, while !busy) latches the command; done pulses
// one cycle when the operation has finished, with err set when the command
// was rejected (zero length or word size, a field outside the row or the
// rows, operands on different rows, a partial overlap of fields, SUB into
// its second operand, ADD/SUB/MULT with all three operands the same).
//
// Lint note: rst_n also appears in the assertions' "disable iff", which a
// linter reports as a reset used both asynchronously and synchronously; the
// assertions are not logic, and every flip-flop uses rst_n asynchronously.
module ap_controller
  import ap_pkg::*;
#(
  parameter int unsigned ROWS      = AP_ROWS,
  parameter int unsigned ROW_BYTES = AP_ROW_BYTES,
  parameter int unsigned XLEN      = 64,
  localparam int unsigned ROW_BITS = ROW_BYTES * 8,
  localparam int unsigned W        = ROW_BITS + 2,
  localparam int unsigned RAW      = $clog2(ROWS),
  localparam int unsigned CAW      = $clog2(ROW_BYTES),
  localparam int unsigned SAW      = RAW + CAW
) (
  input  logic            clk,
  input  logic            rst_n,
  // command
  input  logic            start,
  input  ap_op_e          op,
  input  logic [XLEN-1:0] in_a,
  input  logic [XLEN-1:0] in_b,
  input  logic [XLEN-1:0] out,
  input  logic [XLEN-1:0] len,
  input  logic [3:0]      ws,
  output logic            busy,
  output logic            done,
  output logic            err,
  output logic [31:0]     cnt_pass,
  output logic [31:0]     cnt_write,
  // CAM parallel port
  output logic            cmp_en,
  output logic [W-1:0]    cmp_mask,
  output logic [W-1:0]    cmp_key,
  output logic [RAW-1:0]  row_lo,
  output logic [RAW:0]    row_cnt,
  output logic            wr_en,
  output logic [W-1:0]    wr_mask,
  output logic [W-1:0]    wr_data,
  input  logic            any_match,
  // CAM row port (COPY)
  output logic [RAW-1:0]  row_raddr,
  output logic [RAW-1:0]  row_waddr,
  output logic            row_we,
  output logic [W-1:0]    row_wmask,
  output logic [W-1:0]    row_wdata,
  input  logic [W-1:0]    row_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_COPY, S_FIN} state_e;
  typedef enum logic [3:0] {
    PH_INIT, PH_COPYA, PH_MAIN, PH_SHIFT, PH_CCLR, PH_MLOAD, PH_MADD,
    PH_MCCLR, PH_MFIN, PH_RELU, PH_SET, PH_END
  } phase_e;

  localparam int unsigned PW = $clog2(W);  // width of a CAM bit position

  state_e          state;
  phase_e          phase;
  ap_op_e          op_q;
  logic            inplace;
  logic [7:0]      n;        // word size in bits
  logic [7:0]      i, j;
  logic [1:0]      pass;
  logic [PW-1:0]   pa, pb, pr;
  logic [RAW-1:0]  rowa;
  logic [RAW:0]    cnt;
  logic [127:0]    fval;     // value of a field write
  lut_id_e         main_lut;
  logic            pend;     // previous cycle was a compare
  logic [W-1:0]    pend_mask, pend_data;
  logic [RAW:0]    k;        // COPY element counter
  logic [CAW-1:0]  cola_q, colr_q;
  logic [3:0]      ws_q;

  // ------------------------------------------------------------------
  // Command decode and checks
  // ------------------------------------------------------------------
  logic [RAW-1:0] ra, rb, rr;
  logic [CAW-1:0] ca, cb, cr;
  logic           hi_a, hi_b, hi_r, len_bad;
  logic           use_a, use_b;
  logic           fit_a, fit_b, fit_r, rows_r, rows_a;
  logic           eq_ra, eq_rb, ov_ra, ov_rb;
  logic           cmd_err;

  assign ra = in_a[RAW-1:0];
  assign rb = in_b[RAW-1:0];
  assign rr = out[RAW-1:0];
  assign ca = in_a[SAW-1:RAW];
  assign cb = in_b[SAW-1:RAW];
  assign cr = out[SAW-1:RAW];
  assign hi_a = |(in_a >> SAW);
  assign hi_b = |(in_b >> SAW);
  assign hi_r = |(out  >> SAW);
  assign len_bad = (len == '0) || (len > XLEN'(ROWS));

  assign use_a = (op != OP_SET);
  assign use_b = op inside {OP_ADD, OP_SUB, OP_MULT, OP_XOR, OP_AND, OP_OR};

  assign fit_a  = 32'(ca) + 32'(ws) <= ROW_BYTES;
  assign fit_b  = 32'(cb) + 32'(ws) <= ROW_BYTES;
  assign fit_r  = 32'(cr) + 32'(ws) <= ROW_BYTES;
  assign rows_r = 32'(rr) + 32'(len[RAW:0]) <= ROWS;
  assign rows_a = 32'(ra) + 32'(len[RAW:0]) <= ROWS;

  assign eq_ra = (ca == cr);
  assign eq_rb = (cb == cr);
  assign ov_ra = (32'(ca) < 32'(cr) + 32'(ws)) && (32'(cr) < 32'(ca) + 32'(ws));
  assign ov_rb = (32'(cb) < 32'(cr) + 32'(ws)) && (32'(cr) < 32'(cb) + 32'(ws));

  always_comb begin
    cmd_err = 1'b0;
    if (!is_assoc_op(op) || ws == 4'd0 || len_bad) cmd_err = 1'b1;
    if (hi_r || !fit_r || !rows_r) cmd_err = 1'b1;
    if (use_a && (hi_a || !fit_a || !rows_a)) cmd_err = 1'b1;
    if (use_a && op != OP_COPY && ra != rr) cmd_err = 1'b1;
    if (use_a && op != OP_COPY && ov_ra && !eq_ra) cmd_err = 1'b1;
    if (use_b && (hi_b || !fit_b || rb != rr)) cmd_err = 1'b1;
    if (use_b && ov_rb && !eq_rb) cmd_err = 1'b1;
    if (op == OP_SUB && eq_rb && !eq_ra) cmd_err = 1'b1;
    if (op inside {OP_ADD, OP_SUB, OP_MULT} && eq_ra && eq_rb) cmd_err = 1'b1;
  end

  // ------------------------------------------------------------------
  // Current step: lookup table and bit of each operand
  // ------------------------------------------------------------------
  lut_id_e    step_lut;
  logic       step_field;
  logic [7:0] bit_a, bit_b, bit_r;
  lut_entry_t ent;
  logic [2:0] npasses;

  always_comb begin
    step_lut   = L_ZERO_R;
    step_field = 1'b0;
    bit_a = i;
    bit_b = i;
    bit_r = i;
    unique case (phase)
      PH_INIT, PH_SET: step_field = 1'b1;
      PH_COPYA: step_lut = L_CPY;
      PH_MAIN:  step_lut = main_lut;
      PH_SHIFT: begin
        if (op_q == OP_SHL) begin
          bit_a = i - 8'd1;
          step_lut = inplace ? ((i == 8'd0) ? L_ZERO_R : L_CPY) : L_SH_N;
        end else begin
          bit_a = i + 8'd1;
          step_lut = inplace ? ((i == n - 8'd1) ? L_ZERO_R : L_CPY) : L_SH_N;
        end
      end
      PH_CCLR, PH_MCCLR: step_lut = L_CCLR;
      PH_MLOAD: step_lut = L_MLOAD;
      PH_MADD: begin
        step_lut = L_MADD;
        bit_b = j;
        bit_r = i + j;
      end
      PH_MFIN: step_lut = L_MCLR;
      PH_RELU: begin
        step_lut = L_RELU;
        bit_a = n - 8'd1;
        bit_r = 8'd0;
      end
      default: ;
    endcase
  end

  ap_lut u_lut (
    .id     (step_lut),
    .pass   (pass),
    .entry  (ent),
    .npasses(npasses)
  );

  // Physical compare and write vectors of the current pass.
  logic [W-1:0]  cur_mask, cur_key, cur_wmask, cur_wdata;
  logic [W-1:0]  fmask;
  logic [PW-1:0] pos [LC_N];

  assign pos[LC_A] = pa + PW'(bit_a);
  assign pos[LC_B] = pb + PW'(bit_b);
  assign pos[LC_R] = pr + PW'(bit_r);
  assign pos[LC_C] = PW'(ROW_BITS);
  assign pos[LC_M] = PW'(ROW_BITS + 1);

  assign fmask = ((W'(1) << n) - W'(1)) << pr;

  always_comb begin
    cur_mask  = '0;
    cur_key   = '0;
    cur_wmask = '0;
    cur_wdata = '0;
    if (step_field) begin
      cur_wmask = fmask;
      cur_wdata = (W'(fval) << pr) & fmask;
    end else begin
      for (int c = 0; c < LC_N; c++) begin
        if (ent.care[c])  cur_mask[pos[c]]  = 1'b1;
        if (ent.val[c] && ent.care[c]) cur_key[pos[c]] = 1'b1;
        if (ent.wcare[c]) cur_wmask[pos[c]] = 1'b1;
        if (ent.wval[c] && ent.wcare[c]) cur_wdata[pos[c]] = 1'b1;
      end
    end
  end

  // ------------------------------------------------------------------
  // Step sequencing
  // ------------------------------------------------------------------
  phase_e     nx_phase;
  logic [7:0] nx_i, nx_j;

  always_comb begin
    nx_phase = phase;
    nx_i = i;
    nx_j = j;
    unique case (phase)
      PH_INIT: begin
        unique case (op_q)
          OP_SHL:  begin nx_phase = PH_SHIFT; nx_i = 8'd1; end
          OP_SHR:  begin nx_phase = PH_SHIFT; nx_i = 8'd0; end
          OP_MULT: begin nx_phase = PH_MLOAD; nx_i = n - 8'd1; end
          default: begin nx_phase = PH_MAIN;  nx_i = 8'd0; end
        endcase
      end
      PH_COPYA: begin
        if (i < n - 8'd1) nx_i = i + 8'd1;
        else begin nx_phase = PH_MAIN; nx_i = 8'd0; end
      end
      PH_MAIN: begin
        if (i < n - 8'd1) nx_i = i + 8'd1;
        else nx_phase = (op_q inside {OP_ADD, OP_SUB}) ? PH_CCLR : PH_END;
      end
      PH_SHIFT: begin
        if (op_q == OP_SHL && inplace) begin
          if (i > 8'd0) nx_i = i - 8'd1; else nx_phase = PH_END;
        end else if (op_q == OP_SHL || inplace) begin
          if (i < n - 8'd1) nx_i = i + 8'd1; else nx_phase = PH_END;
        end else begin
          if (i < n - 8'd2) nx_i = i + 8'd1; else nx_phase = PH_END;
        end
      end
      PH_MLOAD: begin nx_phase = PH_MADD; nx_j = 8'd0; end
      PH_MADD: begin
        if (i + j < n - 8'd1) nx_j = j + 8'd1;
        else nx_phase = PH_MCCLR;
      end
      PH_MCCLR: begin
        if (i > 8'd0) begin nx_phase = PH_MLOAD; nx_i = i - 8'd1; end
        else nx_phase = PH_MFIN;
      end
      default: nx_phase = PH_END;
    endcase
  end

  // Start phase of each operation.
  phase_e     st_phase;
  logic [7:0] st_i;
  logic       st_inplace;
  lut_id_e    st_lut;
  logic [PW-1:0] st_pa, st_pb;
  logic [127:0]  st_fval;
  logic [7:0]    st_n;

  assign st_n = {1'b0, ws, 3'b000};

  always_comb begin
    st_inplace = eq_ra || (eq_rb && op inside {OP_ADD, OP_XOR, OP_AND, OP_OR, OP_MULT});
    // After this swap an in-place operation always has R == A and B as its
    // other source.
    st_pa = PW'(ca) << 3;
    st_pb = PW'(cb) << 3;
    if (use_b && !eq_ra && eq_rb) begin
      st_pa = PW'(cb) << 3;
      st_pb = PW'(ca) << 3;
    end
    st_fval = '0;
    if (op == OP_OR) st_fval = '1;
    if (op == OP_SET) st_fval = 128'(in_a);
    st_i = 8'd0;
    st_phase = PH_MAIN;
    st_lut = L_ADD;
    unique case (op)
      OP_ADD:  begin st_lut = L_ADD; st_phase = st_inplace ? PH_MAIN : PH_COPYA; end
      OP_SUB:  begin st_lut = L_SUB; st_phase = st_inplace ? PH_MAIN : PH_COPYA; end
      OP_XOR:  begin st_lut = st_inplace ? L_XOR_I : L_XOR_N; st_phase = st_inplace ? PH_MAIN : PH_INIT; end
      OP_AND:  begin st_lut = st_inplace ? L_AND_I : L_AND_N; st_phase = st_inplace ? PH_MAIN : PH_INIT; end
      OP_OR:   begin st_lut = st_inplace ? L_OR_I  : L_OR_N;  st_phase = st_inplace ? PH_MAIN : PH_INIT; end
      OP_NOT:  begin st_lut = st_inplace ? L_NOT_I : L_NOT_N; st_phase = st_inplace ? PH_MAIN : PH_INIT; end
      OP_SHL:  begin st_phase = st_inplace ? PH_SHIFT : PH_INIT; st_i = st_n - 8'd1; end
      OP_SHR:  begin st_phase = st_inplace ? PH_SHIFT : PH_INIT; st_i = 8'd0; end
      OP_MULT: begin st_phase = st_inplace ? PH_MLOAD : PH_INIT; st_i = st_n - 8'd1; end
      OP_RELU: st_phase = PH_RELU;
      OP_SET:  st_phase = PH_SET;
      default: st_phase = PH_END;
    endcase
  end

  // ------------------------------------------------------------------
  // Engine
  // ------------------------------------------------------------------
  logic [W-1:0] copy_field, copy_mask;
  assign copy_mask  = ((W'(1) << {ws_q, 3'b000}) - W'(1)) << {colr_q, 3'b000};
  assign copy_field = ((row_rdata >> {cola_q, 3'b000}) << {colr_q, 3'b000}) & copy_mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      phase     <= PH_END;
      op_q      <= OP_NONE;
      inplace   <= 1'b0;
      n         <= 8'd8;
      i         <= '0;
      j         <= '0;
      pass      <= '0;
      pa        <= '0;
      pb        <= '0;
      pr        <= '0;
      rowa      <= '0;
      row_lo    <= '0;
      cnt       <= '0;
      fval      <= '0;
      main_lut  <= L_ADD;
      pend      <= 1'b0;
      pend_mask <= '0;
      pend_data <= '0;
      k         <= '0;
      cola_q    <= '0;
      colr_q    <= '0;
      ws_q      <= '0;
      done      <= 1'b0;
      err       <= 1'b0;
      cnt_pass  <= '0;
      cnt_write <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            op_q      <= op;
            n         <= st_n;
            ws_q      <= ws;
            inplace   <= st_inplace;
            main_lut  <= st_lut;
            phase     <= st_phase;
            i         <= st_i;
            j         <= '0;
            pass      <= '0;
            pa        <= st_pa;
            pb        <= st_pb;
            pr        <= PW'(cr) << 3;
            rowa      <= ra;
            row_lo    <= rr;
            cnt       <= len[RAW:0];
            cola_q    <= ca;
            colr_q    <= cr;
            fval      <= st_fval;
            pend      <= 1'b0;
            k         <= '0;
            cnt_pass  <= '0;
            cnt_write <= '0;
            err       <= cmd_err;
            if (cmd_err)              state <= S_FIN;
            else if (op == OP_COPY)   state <= S_COPY;
            else                      state <= S_RUN;
          end
        end
        S_RUN: begin
          if (pend && any_match) begin
            pend      <= 1'b0;
            cnt_write <= cnt_write + 32'd1;
          end else if (phase == PH_END) begin
            pend  <= 1'b0;
            state <= S_FIN;
          end else begin
            pend      <= 1'b1;
            pend_mask <= cur_wmask;
            pend_data <= cur_wdata;
            cnt_pass  <= cnt_pass + 32'd1;
            if (32'(pass) + 32'd1 < 32'(npasses)) begin
              pass <= pass + 2'd1;
            end else begin
              pass  <= '0;
              phase <= nx_phase;
              i     <= nx_i;
              j     <= nx_j;
            end
          end
        end
        S_COPY: begin
          cnt_pass <= cnt_pass + 32'd1;
          if (k + 1'b1 >= cnt) state <= S_FIN;
          k <= k + 1'b1;
        end
        default: begin  // S_FIN
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // CAM drive.
  logic run_cmp;
  assign run_cmp  = (state == S_RUN) && !(pend && any_match) && (phase != PH_END);
  assign cmp_en   = run_cmp;
  assign cmp_mask = cur_mask;
  assign cmp_key  = cur_key;
  assign row_cnt  = cnt;
  assign wr_en    = (state == S_RUN) && pend && any_match;
  assign wr_mask  = pend_mask;
  assign wr_data  = pend_data;

  assign row_raddr = rowa + RAW'(k);
  assign row_waddr = row_lo + RAW'(k);
  assign row_we    = (state == S_COPY);
  assign row_wmask = copy_mask;
  assign row_wdata = copy_field;

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
