// tb_pc_follower: self-checking test of the PC follower.
//
// A random program walk (ARM and Thumb code, near and far branches, changes
// of instruction set) is turned into decoded packets the way a PTM compresses
// addresses (fewest address bytes that give the new PC, five bytes when the
// instruction set changes). Every PC update must equal the walk's PC, one
// clock edge after the packet. Also checked: no update before the first
// I-sync, invalidation on a reserved header and on loss of synchronisation,
// and the error pulse on a Jazelle address.
module tb_pc_follower;
  import ptm_pkg::*;
  import pft_enc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic synced = 1'b0, pkt_valid = 1'b0;
  pft_pkt_t pkt = '0;
  logic upd_valid, pc_valid, isa_err;
  pc_upd_t upd;

  pc_follower dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_by_len[6];
  int n_isa_switch = 0, n_wp = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  // Present one packet for one cycle; return whether an update came out and its value.
  task automatic send(pft_pkt_t p, output bit got, output pc_upd_t u, output bit ierr);
    @(negedge clk);
    pkt = p; pkt_valid = 1'b1;
    @(negedge clk);
    pkt_valid = 1'b0;
    got = upd_valid; u = upd; ierr = isa_err;
  endtask

  function automatic pft_pkt_t enc_branch(logic [31:0] prev, bit pth, logic [31:0] nxt,
                                          bit th, bit wp);
    pft_pkt_t p;
    int n;
    p = '0;
    n = addr_bytes(prev, pth, nxt, th);
    p.ptype  = wp ? PKT_WPUPD : PKT_BRANCH;
    p.nbytes = 3'(n);
    p.addr   = 32'(addr_payload(nxt, th));
    if (n < 5) p.addr &= (32'h1 << (6 + 7*(n-1))) - 1;
    else       p.last = fifth(nxt, th, 1'b0);
    return p;
  endfunction

  initial begin
    bit got, ierr;
    pc_upd_t u;
    pft_pkt_t p;
    logic [31:0] pc, nxt;
    bit th, nth;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    synced = 1'b1;

    // A branch before any I-sync: the PC is unknown, no update.
    p = enc_branch(32'h0, 1'b0, 32'h100, 1'b0, 1'b0);
    send(p, got, u, ierr);
    check(!got && !pc_valid, "update before I-sync");

    for (int round = 0; round < 20; round++) begin
      // I-sync
      pc = $urandom; th = 1'($urandom);
      pc = th ? {pc[31:1], 1'b0} : {pc[31:2], 2'b00};
      p = '0; p.ptype = PKT_ISYNC; p.addr = {pc[31:1], th};
      send(p, got, u, ierr);
      check(got && u.pc == pc && u.isa == (th ? ISA_THUMB : ISA_ARM) && pc_valid,
            $sformatf("I-sync pc=%h got=%b %h", pc, got, u.pc));
      for (int k = 0; k < 200; k++) begin
        nth = ($urandom_range(0, 9) == 0) ? !th : th;
        case ($urandom_range(0, 3))
          0: nxt = pc + 32'($urandom_range(0, 60));             // short forward
          1: nxt = pc - 32'($urandom_range(0, 2000));           // loop back
          2: nxt = pc ^ (32'h1 << $urandom_range(2, 31));       // far
          default: nxt = $urandom;
        endcase
        nxt = nth ? {nxt[31:1], 1'b0} : {nxt[31:2], 2'b00};
        p = enc_branch(pc, th, nxt, nth, $urandom_range(0, 2) == 0);
        n_by_len[p.nbytes]++;
        if (nth != th) n_isa_switch++;
        if (p.ptype == PKT_WPUPD) n_wp++;
        send(p, got, u, ierr);
        check(got && u.pc == nxt && u.isa == (nth ? ISA_THUMB : ISA_ARM),
              $sformatf("branch %h->%h n=%0d th=%b->%b got=%b %h", pc, nxt, p.nbytes, th, nth,
                        got, u.pc));
        pc = nxt; th = nth;
        // packets that do not move the PC
        if ($urandom_range(0, 3) == 0) begin
          p = '0; p.ptype = PKT_ATOM;
          send(p, got, u, ierr);
          check(!got, "atom moved the PC");
        end
      end
      // End of the round: lose the PC one way or another.
      case (round % 3)
        0: begin
          p = '0; p.ptype = PKT_BAD;
          send(p, got, u, ierr);
        end
        1: begin
          @(negedge clk); synced = 1'b0;
          @(negedge clk); synced = 1'b1;
        end
        default: begin
          p = '0; p.ptype = PKT_BRANCH; p.nbytes = 3'd5; p.last = 8'b0010_0000;  // Jazelle
          send(p, got, u, ierr);
          check(ierr, "no isa_err on a Jazelle address");
        end
      endcase
      check(!pc_valid, "PC still valid after losing it");
      p = enc_branch(pc, th, pc + 4, th, 1'b0);
      send(p, got, u, ierr);
      check(!got, "update without a known PC");
    end

    for (int n = 1; n <= 5; n++) check(n_by_len[n] > 0, $sformatf("no %0d-byte address", n));
    check(n_isa_switch > 0 && n_wp > 0, "no ISA switch or waypoint update");
    $display("address bytes 1..5: %0d %0d %0d %0d %0d, ISA switches %0d, waypoint updates %0d",
             n_by_len[1], n_by_len[2], n_by_len[3], n_by_len[4], n_by_len[5], n_isa_switch, n_wp);
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
