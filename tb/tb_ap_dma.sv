// Self-checking testbench of ap_dma.
//
// A main-memory model grants requests (every cycle, or at random) and
// returns read data in order after a delay of one cycle, or a random delay;
// a scratch-pad model answers reads in the same cycle. Each transfer is
// checked byte for byte in both memories, including the bytes next to the
// copied block that must stay as they were. With a memory that grants every
// cycle and answers in the next one, the cycle count from start to done is
// checked against 11 setup cycles plus one cycle per byte: done rises at
// the (SETUP + len + 1)-th clock edge after the edge that takes start for a
// store (the extra edge registers done), one edge later for a load because
// its last byte comes back one cycle after its request.
module tb_ap_dma;
  localparam int unsigned MAW = 12;
  localparam int unsigned SAW = 8;
  localparam int unsigned LW = 8;
  localparam int unsigned SETUP = 11;
  localparam int unsigned MEM = 1 << MAW;
  localparam int unsigned SPM = 1 << SAW;

  logic clk = 0, rst_n = 0;
  logic start = 0, dir = 0;
  logic [MAW-1:0] mem_base = '0;
  logic [SAW-1:0] spm_base = '0;
  logic [LW-1:0] len = '0;
  logic busy, done;
  logic mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [MAW-1:0] mem_addr;
  logic [7:0] mem_wdata, mem_rdata;
  logic spm_we;
  logic [SAW-1:0] spm_waddr, spm_raddr;
  logic [7:0] spm_wdata, spm_rdata;

  logic [7:0] mem [MEM];
  logic [7:0] spm [SPM];
  logic [7:0] mem_exp [MEM];
  logic [7:0] spm_exp [SPM];

  bit random_mem = 0;
  int checks = 0;
  int failures = 0;

  ap_dma #(.MAW(MAW), .SAW(SAW), .LW(LW), .SETUP(SETUP)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Scratch-pad: combinational read, write at the clock edge.
  assign spm_rdata = spm[spm_raddr];
  always_ff @(posedge clk) if (rst_n && spm_we) spm[spm_waddr] <= spm_wdata;

  // Main memory: grant, in-order read return after a delay.
  logic [7:0] rq_data [$];
  int         rq_due [$];
  int         cyc = 0;
  logic       gnt_rnd = 1'b1;
  assign mem_gnt = random_mem ? gnt_rnd : 1'b1;

  always @(posedge clk) begin
    if (mem_rvalid) begin
      void'(rq_data.pop_front());
      void'(rq_due.pop_front());
    end
    cyc <= cyc + 1;
    gnt_rnd <= ($urandom_range(3) != 0);
    if (rst_n && mem_req && mem_gnt) begin
      if (mem_we) mem[mem_addr] <= mem_wdata;
      else begin
        rq_data.push_back(mem[mem_addr]);
        rq_due.push_back(cyc + 1 + (random_mem ? $urandom_range(3) : 0));
      end
    end
  end

  always @* begin
    mem_rvalid = 1'b0;
    mem_rdata  = '0;
    if (rq_due.size() > 0 && rq_due[0] <= cyc) begin
      mem_rvalid = 1'b1;
      mem_rdata  = rq_data[0];
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One transfer; returns the cycles from start to done.
  task automatic xfer(input bit d, input int mb, input int sb, input int n, output int lat);
    @(negedge clk);
    start = 1; dir = d; mem_base = MAW'(mb); spm_base = SAW'(sb); len = LW'(n);
    for (int k = 0; k < n; k++)
      if (d) mem_exp[mb + k] = spm_exp[sb + k];
      else   spm_exp[sb + k] = mem_exp[mb + k];
    lat = 0;
    @(negedge clk);
    start = 0;
    lat = 1;
    check(busy, "busy after start");
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  task automatic compare(input string what);
    int bad = 0;
    for (int a = 0; a < MEM; a++) if (mem[a] !== mem_exp[a]) bad++;
    for (int a = 0; a < SPM; a++) if (spm[a] !== spm_exp[a]) bad++;
    check(bad == 0, $sformatf("%s: %0d bytes differ", what, bad));
  endtask

  initial begin
    int lat, mb, sb, n;
    bit d;
    for (int a = 0; a < MEM; a++) begin mem[a] = 8'($urandom); mem_exp[a] = mem[a]; end
    for (int a = 0; a < SPM; a++) begin spm[a] = 8'($urandom); spm_exp[a] = spm[a]; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");

    // Timed transfers with an ideal memory.
    for (int t = 0; t < 12; t++) begin
      n  = (t < 2) ? t + 1 : $urandom_range(60, 1);
      d  = t[0];
      mb = $urandom_range(MEM - n);
      sb = $urandom_range(SPM - n);
      xfer(d, mb, sb, n, lat);
      check(lat == int'(SETUP) + n + (d ? 1 : 2),
            $sformatf("%s of %0d bytes took %0d cycles", d ? "store" : "load", n, lat));
      compare($sformatf("transfer %0d", t));
    end

    // Random grants and read delays.
    random_mem = 1;
    for (int t = 0; t < 20; t++) begin
      n  = $urandom_range(80, 1);
      d  = 1'($urandom_range(1));
      mb = $urandom_range(MEM - n);
      sb = $urandom_range(SPM - n);
      xfer(d, mb, sb, n, lat);
      check(lat >= int'(SETUP) + n, $sformatf("stalled transfer took %0d cycles", lat));
      compare($sformatf("stalled transfer %0d", t));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
