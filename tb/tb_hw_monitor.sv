// tb_hw_monitor: end-to-end test of the hardware monitor at its default
// parameters.
//
// Software's part is played by an AXI4-Lite master: it sets five confidence
// ranges (one of them left disabled), enables checking, and after each phase
// reads the status, the first offending PC and the counters, then clears the
// error. The traced core is played by a program walk that is encoded as a PTM
// would: junk before the first A-sync, I-sync, compressed branch addresses of
// every length, waypoint updates, changes between ARM and Thumb, branches with
// exception information, atoms, timestamps, context ID, trigger, ignore and
// exception return packets, and now and then a reserved header after which
// the stream resynchronises. Most branches stay inside the enabled ranges;
// some go outside, or into the disabled range (control-flow errors).
//
// Checked: the number of violations of each phase, the error output, ERR_PC,
// ERR_COUNT, CHECK_COUNT, PC, the status bits, the error clear, that a
// phase without errors leaves the error output low, and the latency from the
// last byte of an offending packet to the violation pulse. Each mechanism is
// counted, and one that never happened counts as a failure.
module tb_hw_monitor;
  import ptm_pkg::*;
  import pft_enc_pkg::*;

  localparam int AW = 8;

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
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Mechanism counters.
  int m_async, m_isync, m_len[6], m_wp, m_isa, m_exc, m_other, m_bad, m_viol_out,
      m_viol_disabled, m_edge, m_clear, m_quiet_phase, m_latency;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------------------------------------------------------- AXI
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

  // ------------------------------------------------------- ranges
  localparam int NCFG = 5;
  logic [31:0] lo [NCFG] = '{32'h0010_0000, 32'h0010_8000, 32'h2000_0000, 32'hFFFF_0000, 32'h0030_0000};
  logic [31:0] hi [NCFG] = '{32'h0010_3FFC, 32'h0010_9FFC, 32'h2000_0FFE, 32'hFFFF_FFFC, 32'h0030_0FFC};
  localparam logic [7:0] EN_MASK = 8'b0000_1111;   // range 4 stays disabled

  function automatic bit allowed(logic [31:0] pc);
    for (int i = 0; i < NCFG; i++)
      if (EN_MASK[i] && pc >= lo[i] && pc <= hi[i]) return 1'b1;
    return 1'b0;
  endfunction

  // Random target; thumb code lives in range 2, ARM code elsewhere.
  function automatic logic [31:0] pick(bit thumb, int kind);
    logic [31:0] a;
    int r;
    r = thumb ? 2 : (($urandom_range(0, 3) == 0) ? 3 : $urandom_range(0, 1));
    case (kind)
      0: a = lo[r];
      1: a = hi[r];
      2: a = lo[r] + ($urandom % (hi[r] - lo[r] + 1));
      3: a = lo[4] + ($urandom % (hi[4] - lo[4] + 1));     // disabled range
      default: begin
        do a = $urandom; while (allowed(a & 32'hFFFF_FFFC));
      end
    endcase
    return thumb ? {a[31:1], 1'b0} : {a[31:2], 2'b00};
  endfunction

  // ------------------------------------------------------- trace
  bq_t stream;
  int  bad_idx[$];      // stream index of the last byte of each offending packet

  task automatic other_packet();
    case ($urandom_range(0, 6))
      0: stream.push_back({1'b1, 6'($urandom), 1'b0});
      1: begin
        stream.push_back(($urandom_range(0, 1) != 0) ? HDR_TS0 : HDR_TS1);
        stream.push_back(8'h81); stream.push_back(8'h12);
      end
      2: stream.push_back(HDR_CID);                 // no context ID bytes configured
      3: stream.push_back(HDR_TRIGGER);
      4: stream.push_back(HDR_IGNORE);
      5: stream.push_back(HDR_EXCRET);
      default: begin stream.push_back(HDR_VMID); stream.push_back(8'($urandom)); end
    endcase
    m_other++;
  endtask

  // One phase of program trace; returns the expected offending PCs.
  task automatic build_phase(int nbr, int err_rate, output logic [31:0] bad[$],
                             output logic [31:0] last_pc);
    logic [31:0] pc, nxt;
    bit th, nth, wp, exc;
    int n, kind;
    bad = {};
    stream = {};
    bad_idx = {};
    // junk only before the very first A-sync, while the decoder is unsynchronised
    if (m_async == 0) repeat (6) stream.push_back(8'($urandom_range(1, 255)));
    push_async(stream); m_async++;
    th = 1'($urandom);
    pc = pick(th, 2);
    push_isync(stream, {pc[31:1], th}, 8'h00, 0); m_isync++;
    if (!allowed(pc)) begin bad.push_back(pc); bad_idx.push_back(stream.size() - 1); end
    for (int k = 0; k < nbr; k++) begin
      nth  = ($urandom_range(0, 7) == 0) ? !th : th;
      kind = ($urandom_range(0, 99) < err_rate) ? $urandom_range(3, 4) : $urandom_range(0, 2);
      nxt  = pick(nth, kind);
      if (kind == 0 || kind == 1) m_edge++;
      wp  = ($urandom_range(0, 3) == 0);
      n   = addr_bytes(pc, th, nxt, nth);
      exc = (n == 5) && !wp && ($urandom_range(0, 1) != 0);
      if (wp) begin stream.push_back(HDR_WPUPD); m_wp++; end
      push_addr(stream, n, addr_payload(nxt, nth), fifth(nxt, nth, exc));
      if (exc) begin push_exc(stream, 9'($urandom), $urandom_range(0, 1)); m_exc++; end
      m_len[n]++;
      if (nth != th) m_isa++;
      if (!allowed(nxt)) begin
        bad.push_back(nxt);
        bad_idx.push_back(stream.size() - 1);
        if (kind == 3) m_viol_disabled++; else m_viol_out++;
      end
      pc = nxt; th = nth;
      if ($urandom_range(0, 2) == 0) other_packet();
      if (k == nbr / 2 && $urandom_range(0, 1) == 0) begin
        // reserved header: the trace is lost until A-sync and I-sync
        stream.push_back(8'h04); stream.push_back(8'h72); m_bad++;
        push_async(stream); m_async++;
        push_isync(stream, {pc[31:1], th}, 8'h00, 0); m_isync++;
        if (!allowed(pc)) begin bad.push_back(pc); bad_idx.push_back(stream.size() - 1); end
      end
    end
    last_pc = pc;
  endtask

  int viol_seen;
  int viol_cycle[$];
  always @(negedge clk) if (violation) begin viol_seen++; viol_cycle.push_back(cyc); end

  task automatic drive_phase(bit gaps, output int bad_cycle[$]);
    int idx;
    bad_cycle = {};
    idx = 0;
    while (idx < stream.size()) begin
      @(negedge clk);
      if (gaps && $urandom_range(0, 5) == 0) begin
        trace_valid = 1'b0; trace_data = 8'($urandom);
      end else begin
        trace_valid = 1'b1; trace_data = stream[idx];
        if (bad_idx.size() > 0 && bad_idx[0] == idx) begin
          void'(bad_idx.pop_front());
          bad_cycle.push_back(cyc + 1);   // the edge that samples this byte
        end
        idx++;
      end
    end
    @(negedge clk);
    trace_valid = 1'b0;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    logic [31:0] v, last_pc;
    logic [31:0] bad[$];
    int bad_cycle[$];
    int total_bad, total_checks_lo, n_bad_before;
    total_checks_lo = 0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < NCFG; i++) begin
      axi_write(AW'('h40 + 8*i), lo[i]);
      axi_write(AW'('h44 + 8*i), hi[i]);
    end
    axi_write(AW'('h04), 32'(EN_MASK));
    axi_write(AW'('h00), 32'h1);
    axi_read(AW'('h08), v);
    check(v[2:0] == 3'b000, $sformatf("status before trace %h", v));

    total_bad = 0;
    for (int ph = 0; ph < 12; ph++) begin
      int rate;
      rate = (ph % 4 == 1) ? 0 : 8;
      n_bad_before = m_bad;
      build_phase(400, rate, bad, last_pc);
      viol_seen = 0;
      viol_cycle = {};
      drive_phase(ph % 3 != 0, bad_cycle);
      total_bad += bad.size();
      check(viol_seen == bad.size(),
            $sformatf("phase %0d: %0d violations, want %0d", ph, viol_seen, bad.size()));
      check(error == (bad.size() > 0), $sformatf("phase %0d: error=%b", ph, error));
      // violation pulses come three edges after the packet's last byte is sampled
      if (viol_cycle.size() == bad_cycle.size()) begin
        foreach (bad_cycle[j]) begin
          check(viol_cycle[j] == bad_cycle[j] + 3,
                $sformatf("latency %0d", viol_cycle[j] - bad_cycle[j]));
          m_latency++;
        end
      end
      axi_read(AW'('h08), v);
      check(v[0] == (bad.size() > 0) && v[1] && v[2] && v[3] == (m_bad != n_bad_before),
            $sformatf("STATUS %h", v));
      axi_read(AW'('h0C), v);
      check(v == last_pc, $sformatf("PC %h want %h", v, last_pc));
      axi_read(AW'('h14), v);
      check(v == 32'(total_bad), $sformatf("ERR_COUNT %0d want %0d", v, total_bad));
      axi_read(AW'('h18), v);
      check(v > 32'(total_checks_lo), "CHECK_COUNT did not grow");
      total_checks_lo = int'(v);
      axi_write(AW'('h08), 32'h18);        // clear the sticky status bits
      if (bad.size() > 0) begin
        axi_read(AW'('h10), v);
        axi_write(AW'('h08), 32'h01);      // clear the error
        check(v == bad[0], $sformatf("ERR_PC %h want %h", v, bad[0]));
        @(negedge clk);
        check(!error, "error not cleared");
        m_clear++;
      end else m_quiet_phase++;
    end

    // Checking disabled: an excursion is not flagged.
    axi_write(AW'('h00), 32'h0);
    stream = {};
    push_async(stream);
    push_isync(stream, 32'h0BAD_0000, 8'h00, 0);
    bad_idx = {};
    viol_seen = 0;
    drive_phase(1'b0, bad_cycle);
    check(viol_seen == 0 && !error, "violation while checking disabled");

    $display("A-sync %0d, I-sync %0d, address bytes 1..5: %0d %0d %0d %0d %0d",
             m_async, m_isync, m_len[1], m_len[2], m_len[3], m_len[4], m_len[5]);
    $display("waypoint updates %0d, ISA switches %0d, exception branches %0d, other packets %0d",
             m_wp, m_isa, m_exc, m_other);
    $display("resyncs %0d, violations out of ranges %0d, in disabled range %0d, edge targets %0d",
             m_bad, m_viol_out, m_viol_disabled, m_edge);
    $display("clears %0d, quiet phases %0d, latency checks %0d", m_clear, m_quiet_phase, m_latency);
    for (int n = 1; n <= 5; n++) check(m_len[n] > 0, $sformatf("no %0d-byte address", n));
    check(m_async > 0 && m_isync > 0 && m_wp > 0 && m_isa > 0 && m_exc > 0 && m_other > 0,
          "a packet kind never happened");
    check(m_bad > 0, "no resynchronisation");
    check(m_viol_out > 0 && m_viol_disabled > 0 && m_edge > 0, "a violation kind never happened");
    check(m_clear > 0 && m_quiet_phase > 0 && m_latency > 0, "clear/quiet/latency never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
