// tb_matmul_workload: the hardware monitor watching the trace of a 32x32
// matrix multiplication program, with PC bit-flips injected through an
// interrupt return.
//
// The program (ARM state, about 111 kB of code) is laid out as main, the
// matrix multiplication, the duplicated-data check, a library/handler area and
// the exception vectors; software gives each of them a confidence range. The
// trace is what a PTM emits for it: direct branches appear only as atoms, so
// the PC is updated at the indirect branches (each return from the check
// routine after an element is computed, and returns from the routine itself),
// at interrupts (a branch address packet with exception information to the
// IRQ vector, then an indirect jump into the handler) and at each exception
// return.
//
// Part 1: two complete multiplications (1024 elements each) with periodic
// timer interrupts and no faults: the monitor must never flag an error, and
// it must have checked exactly the number of PC updates the program made.
// Part 2: fault injection in the manner of a code-emulated upset: a timer
// interrupt fires at a random element, and the handler returns to the
// interrupted address with one random bit flipped. The monitor must flag the
// run exactly when the corrupted address lies outside every range; the
// testbench then plays the external controller, which reads the error,
// clears it and restarts the program (A-sync, I-sync at main). The share of
// detected flips per bit position is printed.
module tb_matmul_workload;
  import ptm_pkg::*;
  import pft_enc_pkg::*;

  localparam int AW = 8;
  localparam int N  = 32;           // matrix size
  localparam int NINJ = 300;        // injected faults

  logic clk = 1'b0, rst_n = 1'b0;
  logic trace_valid = 1'b0;
  logic [7:0] trace_data = '0;
  logic [AW-1:0] s_axi_awaddr = '0, s_axi_araddr = '0;
  logic s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_rready = 0;
  logic [31:0] s_axi_wdata = '0;
  logic [3:0]  s_axi_wstrb = '0;
  logic s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic [31:0] s_axi_rdata;
  logic error, violation, synced, pc_valid;

  hw_monitor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int viol_seen = 0;
  always @(negedge clk) if (violation) viol_seen++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL: %s", what);
    end
  endtask

  task automatic axi_write(logic [AW-1:0] a, logic [31:0] d);
    @(negedge clk);
    s_axi_awvalid = 1; s_axi_awaddr = a; s_axi_wvalid = 1; s_axi_wdata = d; s_axi_wstrb = 4'hF;
    #1;
    while (!s_axi_awready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_bready = 1;
    while (!s_axi_bvalid) @(negedge clk);
    @(negedge clk);
    s_axi_bready = 0;
  endtask

  task automatic axi_read(logic [AW-1:0] a, output logic [31:0] d);
    @(negedge clk);
    s_axi_arvalid = 1; s_axi_araddr = a;
    #1;
    while (!s_axi_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi_arvalid = 0; s_axi_rready = 1;
    while (!s_axi_rvalid) @(negedge clk);
    d = s_axi_rdata;
    @(negedge clk);
    s_axi_rready = 0;
  endtask

  // Program layout.
  localparam logic [31:0] IMG_BASE  = 32'h0010_0000;
  localparam logic [31:0] IMG_SIZE  = 32'd111 * 1024;
  localparam logic [31:0] MAIN_LO   = IMG_BASE,            MAIN_HI   = IMG_BASE + 32'h0FC;
  localparam logic [31:0] MM_LO     = IMG_BASE + 32'h100,  MM_HI     = IMG_BASE + 32'h3FC;
  localparam logic [31:0] CHK_LO    = IMG_BASE + 32'h400,  CHK_HI    = IMG_BASE + 32'h4FC;
  localparam logic [31:0] LIB_LO    = IMG_BASE + 32'h500,  LIB_HI    = IMG_BASE + IMG_SIZE - 4;
  localparam logic [31:0] VEC_LO    = 32'h0000_0000,       VEC_HI    = 32'h0000_001C;
  localparam int NR = 5;
  logic [31:0] lo [NR] = '{MAIN_LO, MM_LO, CHK_LO, LIB_LO, VEC_LO};
  logic [31:0] hi [NR] = '{MAIN_HI, MM_HI, CHK_HI, LIB_HI, VEC_HI};

  localparam logic [31:0] MM_RET_ELEM = MM_LO + 32'h0A8;   // after the call to the check
  localparam logic [31:0] MAIN_RET    = MAIN_LO + 32'h04C;  // after the call to the multiply
  localparam logic [31:0] IRQ_VEC     = 32'h0000_0018;
  localparam logic [31:0] IRQ_HANDLER = LIB_LO + 32'h2000;

  function automatic bit allowed(logic [31:0] pc);
    for (int i = 0; i < NR; i++) if (pc >= lo[i] && pc <= hi[i]) return 1'b1;
    return 1'b0;
  endfunction

  // Trace generation.
  bq_t  stream;
  logic [31:0] tpc;          // PC the trace last stated
  int   n_updates;           // PC updates the monitor should check

  task automatic branch_to(logic [31:0] nxt, bit exc);
    int n;
    n = exc ? 5 : addr_bytes(tpc, 1'b0, nxt, 1'b0);
    push_addr(stream, n, addr_payload(nxt, 1'b0), fifth(nxt, 1'b0, exc));
    if (exc) push_exc(stream, 9'd5, 1'b0);
    tpc = nxt;
    n_updates++;
  endtask

  task automatic atoms(int n);
    // one atom packet per executed direct branch group (taken/not taken)
    repeat ((n + 3) / 4) stream.push_back({1'b1, 6'($urandom), 1'b0});
  endtask

  task automatic start_program();
    push_async(stream);
    tpc = MAIN_LO;
    push_isync(stream, MAIN_LO, 8'h00, 0);
    n_updates++;
  endtask

  // One element of C = A x B: the k loop, then the duplicated-data check
  // routine (called directly, returns indirectly).
  task automatic element();
    atoms(N);                 // k-loop back branches
    atoms(1);                 // call into the check routine
    atoms(4);                 // comparisons inside the check
    branch_to(MM_RET_ELEM, 1'b0);   // return
  endtask

  // Interrupt: exception entry to the IRQ vector, jump to the handler, some
  // handler work, exception return to ret.
  task automatic interrupt(logic [31:0] ret);
    branch_to(IRQ_VEC, 1'b1);
    branch_to(IRQ_HANDLER, 1'b0);
    atoms(6);
    stream.push_back(HDR_EXCRET);
    branch_to(ret, 1'b0);
  endtask

  task automatic drive();
    for (int idx = 0; idx < stream.size(); idx++) begin
      @(negedge clk);
      trace_valid = 1'b1;
      trace_data  = stream[idx];
    end
    @(negedge clk);
    trace_valid = 1'b0;
    repeat (8) @(negedge clk);
    stream = {};
  endtask

  int det_by_bit[32], inj_by_bit[32];

  initial begin
    logic [31:0] v, bad_pc;
    int n_det, n_undet, b, expected_updates;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NR; i++) begin
      axi_write(AW'('h40 + 8*i), lo[i]);
      axi_write(AW'('h44 + 8*i), hi[i]);
    end
    axi_write(AW'('h04), 32'h1F);
    axi_write(AW'('h00), 32'h1);

    // Part 1: two fault-free multiplications with timer interrupts.
    n_updates = 0;
    start_program();
    for (int rep = 0; rep < 2; rep++) begin
      atoms(2);                                   // call into the multiply
      for (int e = 0; e < N*N; e++) begin
        element();
        if (e % 97 == 13) interrupt(MM_RET_ELEM);
        if (e % 64 == 63) drive();                // stream it out piecewise
      end
      branch_to(MAIN_RET, 1'b0);                  // return to main
      drive();
    end
    axi_read(AW'('h18), v);
    check(v == 32'(n_updates), $sformatf("CHECK_COUNT %0d, program made %0d PC updates", v, n_updates));
    check(!error && viol_seen == 0, "error during fault-free runs");
    expected_updates = n_updates;
    $display("fault-free: %0d PC updates checked, errors %0d", v, viol_seen);

    // Part 2: fault injection through the interrupt return address.
    n_det = 0; n_undet = 0;
    for (int f = 0; f < NINJ; f++) begin
      int at;
      start_program();
      atoms(2);
      at = $urandom_range(0, 40);
      for (int e = 0; e < at; e++) element();
      b = $urandom_range(2, 31);
      bad_pc = MM_RET_ELEM ^ (32'h1 << b);
      viol_seen = 0;
      interrupt(bad_pc);
      drive();
      inj_by_bit[b]++;
      check(viol_seen == (allowed(bad_pc) ? 0 : 1) && error == !allowed(bad_pc),
            $sformatf("flip of bit %0d to %h: violations %0d error %b", b, bad_pc, viol_seen, error));
      if (error) begin
        det_by_bit[b]++;
        n_det++;
        axi_read(AW'('h10), v);
        check(v == bad_pc, $sformatf("ERR_PC %h want %h", v, bad_pc));
        axi_write(AW'('h08), 32'h1);              // controller clears, program restarts
      end else n_undet++;
    end
    $display("injected %0d PC bit-flips: detected %0d, stayed inside a range %0d", NINJ, n_det, n_undet);
    for (int i = 2; i < 32; i++)
      if (inj_by_bit[i] > 0) $display("  bit %2d: %0d of %0d detected", i, det_by_bit[i], inj_by_bit[i]);
    check(n_det > 0 && n_undet > 0, "both detected and undetected flips expected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
