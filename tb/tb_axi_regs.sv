// tb_axi_regs: self-checking test of the monitor's AXI4-Lite register file.
//
// An AXI4-Lite master writes and reads every register with random data and
// byte strobes, with address and data presented in random order and random
// ready delays on the response channels, and compares against a shadow copy.
// Also checks the configuration outputs, the clear pulse of the error flag,
// the sticky status bits and the read-only registers.
module tb_axi_regs;

  localparam int NR = 8;
  localparam int AW = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0] s_awaddr = '0, s_araddr = '0;
  logic s_awvalid = 0, s_wvalid = 0, s_bready = 0, s_arvalid = 0, s_rready = 0;
  logic [31:0] s_wdata = '0;
  logic [3:0]  s_wstrb = '0;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid;
  logic [1:0] s_bresp, s_rresp;
  logic [31:0] s_rdata;
  logic enable, err_clear;
  logic [NR-1:0] range_en;
  logic [31:0] range_lo [NR];
  logic [31:0] range_hi [NR];
  logic error = 0, pc_valid = 0, synced = 0, lost_sync_evt = 0, isa_err_evt = 0;
  logic [31:0] pc = '0, err_pc = '0, err_count = '0, check_count = '0;

  axi_regs #(.NUM_RANGES(NR), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_clear_pulses = 0;
  always @(posedge clk) if (err_clear) n_clear_pulses++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic axi_write(logic [AW-1:0] a, logic [31:0] d, logic [3:0] s);
    int wait_b;
    @(negedge clk);
    // address and data may come in either order
    case ($urandom_range(0, 2))
      0: begin s_awvalid = 1; s_awaddr = a; @(negedge clk); end
      1: begin s_wvalid = 1; s_wdata = d; s_wstrb = s; @(negedge clk); end
      default: ;
    endcase
    s_awvalid = 1; s_awaddr = a; s_wvalid = 1; s_wdata = d; s_wstrb = s;
    #1;
    while (!(s_awready && s_wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0;
    wait_b = $urandom_range(0, 3);
    repeat (wait_b) begin
      check(s_bvalid, "BVALID dropped before BREADY");
      @(negedge clk);
    end
    s_bready = 1;
    while (!s_bvalid) @(negedge clk);
    check(s_bresp == 2'b00, "BRESP");
    @(negedge clk);
    s_bready = 0;
  endtask

  task automatic axi_read(logic [AW-1:0] a, output logic [31:0] d);
    @(negedge clk);
    s_arvalid = 1; s_araddr = a;
    #1;
    while (!s_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_arvalid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
    s_rready = 1;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
    check(s_rresp == 2'b00, "RRESP");
    @(negedge clk);
    s_rready = 0;
  endtask

  function automatic logic [31:0] merge(logic [31:0] o, logic [31:0] d, logic [3:0] s);
    for (int k = 0; k < 4; k++) if (s[k]) o[8*k +: 8] = d[8*k +: 8];
    return o;
  endfunction

  logic [31:0] sh_lo [NR], sh_hi [NR];
  logic [31:0] sh_en, sh_ctrl;

  initial begin
    logic [31:0] d, v;
    logic [3:0] s;
    int r, n_before;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    sh_lo = '{default: '0}; sh_hi = '{default: '0}; sh_en = 0; sh_ctrl = 0;

    for (int t = 0; t < 400; t++) begin
      r = $urandom_range(0, NR + 1);
      d = $urandom; s = 4'($urandom);
      if (r < NR) begin
        if ($urandom_range(0, 1)) begin
          axi_write(AW'('h40 + 8*r), d, s); sh_lo[r] = merge(sh_lo[r], d, s);
        end else begin
          axi_write(AW'('h44 + 8*r), d, s); sh_hi[r] = merge(sh_hi[r], d, s);
        end
      end else if (r == NR) begin
        axi_write(AW'('h04), d, s); sh_en = merge(sh_en, d, s) & ((1 << NR) - 1);
      end else begin
        axi_write(AW'('h00), d, s); if (s[0]) sh_ctrl = {31'b0, d[0]};
      end
      // read back something at random and compare the outputs
      r = $urandom_range(0, NR - 1);
      axi_read(AW'('h40 + 8*r), v); check(v == sh_lo[r], $sformatf("LO[%0d] %h want %h", r, v, sh_lo[r]));
      axi_read(AW'('h44 + 8*r), v); check(v == sh_hi[r], $sformatf("HI[%0d] %h want %h", r, v, sh_hi[r]));
      axi_read(AW'('h04), v);       check(v == sh_en, "RANGE_EN readback");
      axi_read(AW'('h00), v);       check(v == sh_ctrl, "CTRL readback");
      check(range_lo == sh_lo && range_hi == sh_hi, "range outputs");
      check(32'(range_en) == sh_en && enable == sh_ctrl[0], "enable outputs");
    end

    // Read-only registers follow their inputs.
    pc = 32'h1234_5678; err_pc = 32'h0BAD_0000; err_count = 7; check_count = 99;
    error = 1; pc_valid = 1; synced = 1;
    axi_read(AW'('h0C), v); check(v == pc, "PC");
    axi_read(AW'('h10), v); check(v == err_pc, "ERR_PC");
    axi_read(AW'('h14), v); check(v == err_count, "ERR_COUNT");
    axi_read(AW'('h18), v); check(v == check_count, "CHECK_COUNT");
    axi_read(AW'('h08), v); check(v == 32'h7, $sformatf("STATUS %h", v));
    axi_read(AW'('hFC), v); check(v == 0, "unmapped address");

    // Sticky status bits and the error clear pulse.
    @(negedge clk); lost_sync_evt = 1; isa_err_evt = 1;
    @(negedge clk); lost_sync_evt = 0; isa_err_evt = 0;
    axi_read(AW'('h08), v); check(v[4:3] == 2'b11, "sticky bits not set");
    n_before = n_clear_pulses;
    axi_write(AW'('h08), 32'h19, 4'h1);
    check(n_clear_pulses == n_before + 1, "error clear pulse");
    axi_read(AW'('h08), v); check(v[4:3] == 2'b00, "sticky bits not cleared");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
