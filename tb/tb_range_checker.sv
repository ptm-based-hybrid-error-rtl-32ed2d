// tb_range_checker: self-checking test of the confidence range checker.
//
// Random range tables (some ranges disabled, some overlapping, edges probed
// exactly) and random PCs; the expected verdict is computed in the testbench
// by scanning the table. Checks the error flag (sticky until clear, set one
// edge after an offending update), the violation pulse, the first offending
// PC, the counters, and that nothing is flagged while checking is disabled.
module tb_range_checker;
  import ptm_pkg::*;

  localparam int NR = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 1'b0, upd_valid = 1'b0, clear = 1'b0;
  logic [NR-1:0] range_en = '0;
  logic [31:0] range_lo [NR] = '{default: '0};
  logic [31:0] range_hi [NR] = '{default: '0};
  pc_upd_t upd = '0;
  logic error, violation;
  logic [31:0] err_pc, err_count, check_count;

  range_checker #(.NUM_RANGES(NR)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_viol = 0, n_ok = 0, n_clear = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic bit allowed(logic [31:0] pc);
    for (int i = 0; i < NR; i++)
      if (range_en[i] && pc >= range_lo[i] && pc <= range_hi[i]) return 1'b1;
    return 1'b0;
  endfunction

  initial begin
    logic [31:0] pc, lo, first_bad, cnt, chk;
    bit exp_err, in;
    int i;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    exp_err = 0; cnt = 0; chk = 0; first_bad = 0;

    // Checking disabled: nothing flagged.
    @(negedge clk); upd = '{pc: 32'hDEAD_BEE0, isa: ISA_ARM}; upd_valid = 1'b1;
    @(negedge clk); upd_valid = 1'b0;
    check(!error && !violation && err_count == 0, "flagged while disabled");
    enable = 1'b1;

    for (int t = 0; t < 20; t++) begin
      for (int r = 0; r < NR; r++) begin
        lo = $urandom & 32'hFFFF_FFF0;
        range_lo[r] = lo;
        range_hi[r] = lo + ($urandom & 32'h000F_FFFF);
        if (range_hi[r] < lo) range_hi[r] = 32'hFFFF_FFFF;
      end
      range_en = NR'($urandom);
      for (int k = 0; k < 300; k++) begin
        i = $urandom_range(0, NR - 1);
        case ($urandom_range(0, 4))
          0: pc = range_lo[i];
          1: pc = range_hi[i];
          2: pc = range_lo[i] - 1;
          3: pc = range_hi[i] + 1;
          default: pc = $urandom;
        endcase
        in = allowed(pc);
        @(negedge clk);
        upd = '{pc: pc, isa: ISA_ARM}; upd_valid = 1'b1;
        clear = ($urandom_range(0, 15) == 0);
        @(negedge clk);
        upd_valid = 1'b0;
        chk++;
        if (clear) begin exp_err = 0; n_clear++; end
        if (!in) begin
          if (!exp_err) first_bad = pc;
          exp_err = 1; cnt++; n_viol++;
        end else n_ok++;
        clear = 1'b0;
        check(violation == !in, $sformatf("pc %h violation=%b want %b", pc, violation, !in));
        check(error == exp_err, $sformatf("pc %h error=%b want %b", pc, error, exp_err));
        check(!exp_err || err_pc == first_bad, $sformatf("err_pc %h want %h", err_pc, first_bad));
        check(err_count == cnt && check_count == chk, "counters");
        @(negedge clk);
        check(!violation, "violation longer than one cycle");
      end
    end
    check(n_viol > 0 && n_ok > 0 && n_clear > 0, "not every case seen");
    $display("in range %0d, out of range %0d, clears %0d", n_ok, n_viol, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
