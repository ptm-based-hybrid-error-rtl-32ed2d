// tb_pft_decoder: self-checking test of the PFT packet decoder.
//
// Builds a random trace byte stream with pft_enc_pkg: junk before the first
// A-sync, then I-sync, branch address packets of one to five address bytes
// (with and without exception bytes), waypoint updates, atoms, trigger,
// context ID, VMID, timestamp, exception return and ignore packets, a
// reserved header now and then (after which the stream resynchronises), with
// idle cycles in between. Every packet the decoder reports is compared with
// the one that was encoded, and its latency (two clock edges after the last
// byte was sampled) is checked.
module tb_pft_decoder;
  import ptm_pkg::*;
  import pft_enc_pkg::*;

  localparam int CID_BYTES = 2;
  localparam int NPKT      = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [7:0] in_byte = '0;
  logic pkt_valid, synced;
  pft_pkt_t pkt;

  pft_decoder #(.CID_BYTES(CID_BYTES)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {
    pkt_type_e   ptype;
    logic [31:0] addr;
    int          nbytes;
    logic [7:0]  last;
    logic        exc;
    logic [8:0]  excnum;
    logic [7:0]  info;
    int          end_idx;   // index of the packet's last byte in the stream
    int          due;       // cycle in which it must be reported
  } exp_t;

  bq_t  stream;
  exp_t exp_q[$];
  exp_t pend[$];
  int   type_seen[pkt_type_e];

  function automatic exp_t mk(pkt_type_e t);
    exp_t e;
    e = '{ptype: t, addr: '0, nbytes: 0, last: '0, exc: 1'b0, excnum: '0, info: '0,
          end_idx: 0, due: 0};
    return e;
  endfunction

  task automatic add(exp_t e);
    e.end_idx = stream.size() - 1;
    exp_q.push_back(e);
  endtask

  // Build the stream.
  initial begin : build
    exp_t e;
    int   kind, n;
    logic [26:0] pl;
    logic [31:0] a;
    logic [7:0]  l;
    repeat (7) stream.push_back(8'h55);   // junk before synchronisation
    stream.push_back(8'h80);              // 0x80 without the zeros: ignored
    push_async(stream); add(mk(PKT_ASYNC));
    for (int p = 0; p < NPKT; p++) begin
      kind = $urandom_range(0, 14);
      case (kind)
        0: begin
          a = $urandom; l = 8'($urandom);
          push_isync(stream, a, l, CID_BYTES);
          e = mk(PKT_ISYNC); e.addr = a; e.info = l; e.nbytes = 0; add(e);
        end
        1, 2, 3: begin
          n  = $urandom_range(1, 5);
          pl = 27'($urandom);
          e  = mk(PKT_BRANCH); e.nbytes = n;
          e.addr = 32'(pl & ((27'h1 << (n == 5 ? 27 : 6 + 7*(n-1))) - 27'h1));
          if (n == 5) begin
            e.exc  = 1'($urandom);
            l = fifth($urandom, 1'($urandom), e.exc);
            e.last = l;
            push_addr(stream, 5, pl, l);
            if (e.exc) begin
              e.excnum = 9'($urandom);
              if ($urandom_range(0, 1) == 0) begin
                e.excnum[8:4] = '0;
                push_exc(stream, e.excnum, 1'b0);
              end else push_exc(stream, e.excnum, 1'b1);
            end
          end else push_addr(stream, n, pl, 8'h00);
          add(e);
        end
        4, 5: begin
          n  = $urandom_range(1, 5);
          pl = 27'($urandom);
          stream.push_back(HDR_WPUPD);
          e  = mk(PKT_WPUPD); e.nbytes = n; e.info = HDR_WPUPD;
          e.addr = 32'(pl & ((27'h1 << (n == 5 ? 27 : 6 + 7*(n-1))) - 27'h1));
          if (n == 5) begin
            l = fifth($urandom, 1'($urandom), 1'($urandom));
            e.last = l;
            push_addr(stream, 5, pl, l);
            if (l[6]) begin
              e.info = 8'($urandom);
              stream.push_back(e.info);
            end
          end else push_addr(stream, n, pl, 8'h00);
          add(e);
        end
        6, 7: begin
          l = {1'b1, 6'($urandom), 1'b0};
          stream.push_back(l); e = mk(PKT_ATOM); e.info = l; add(e);
        end
        8: begin stream.push_back(HDR_TRIGGER); add(mk(PKT_TRIGGER)); end
        9: begin
          stream.push_back(HDR_CID);
          repeat (CID_BYTES) stream.push_back(8'($urandom));
          add(mk(PKT_CID));
        end
        10: begin
          stream.push_back(HDR_VMID); stream.push_back(8'($urandom)); add(mk(PKT_VMID));
        end
        11: begin
          stream.push_back($urandom_range(0, 1) ? HDR_TS0 : HDR_TS1);
          n = $urandom_range(1, 9);
          for (int k = 0; k < n; k++)
            stream.push_back({(k < n - 1) ? 1'b1 : ((k == 8) ? 1'($urandom) : 1'b0), 7'($urandom)});
          add(mk(PKT_TS));
        end
        12: begin stream.push_back(HDR_EXCRET); add(mk(PKT_EXCRET)); end
        13: begin stream.push_back(HDR_IGNORE); add(mk(PKT_IGNORE)); end
        default: begin
          if ($urandom_range(0, 3) == 0) begin
            // reserved header: boundaries lost, junk, then A-sync again
            stream.push_back(8'h04); e = mk(PKT_BAD); add(e);
            stream.push_back(8'h08); stream.push_back(8'h72);
            push_async(stream); add(mk(PKT_ASYNC));
          end else begin
            push_async(stream); add(mk(PKT_ASYNC));
          end
        end
      endcase
    end
  end

  // Drive the stream, with random idle cycles.
  initial begin : drive
    int idx = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (idx < stream.size()) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        in_valid = 1'b0;
        in_byte  = 8'($urandom);
      end else begin
        in_valid = 1'b1;
        in_byte  = stream[idx];
        while (exp_q.size() > 0 && exp_q[0].end_idx == idx) begin
          exp_t e;
          e = exp_q.pop_front();
          e.due = cyc + 2;        // sampled at the next edge, reported one edge later
          pend.push_back(e);
        end
        idx++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (pend.size() != 0 || exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d packets never reported", pend.size() + exp_q.size());
    end
    foreach (type_seen[t]) $display("  %s: %0d", t.name(), type_seen[t]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare every reported packet.
  always @(negedge clk) begin
    if (rst_n && pkt_valid) begin
      exp_t e;
      bit ok;
      checks++;
      if (pend.size() == 0) begin
        failures++;
        $display("FAIL: unexpected packet %s", pkt.ptype.name());
      end else begin
        e  = pend.pop_front();
        ok = (pkt.ptype == e.ptype) && (cyc == e.due);
        case (e.ptype)
          PKT_ISYNC: ok &= (pkt.addr == e.addr) && (pkt.info == e.info);
          PKT_BRANCH, PKT_WPUPD: begin
            ok &= (pkt.addr == e.addr) && (int'(pkt.nbytes) == e.nbytes);
            if (e.nbytes == 5) ok &= (pkt.last == e.last);
            if (e.ptype == PKT_BRANCH)
              ok &= (pkt.exc == e.exc) && (!e.exc || pkt.excnum == e.excnum);
            else if (e.nbytes == 5 && e.last[6]) ok &= (pkt.info == e.info);
          end
          default: ;
        endcase
        if (!type_seen.exists(e.ptype)) type_seen[e.ptype] = 0;
        type_seen[e.ptype]++;
        if (!ok) begin
          failures++;
          if (failures < 10)
            $display("FAIL @%0d: got %s addr=%h n=%0d last=%h exc=%b/%h info=%h; want %s addr=%h n=%0d last=%h exc=%b/%h due=%0d",
                     cyc, pkt.ptype.name(), pkt.addr, pkt.nbytes, pkt.last, pkt.exc, pkt.excnum,
                     pkt.info, e.ptype.name(), e.addr, e.nbytes, e.last, e.exc, e.excnum, e.due);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
