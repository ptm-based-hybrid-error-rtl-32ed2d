// pft_decoder: identifies and delimits the packets of a PFT trace byte stream.
//
// The PTM emits packets of a variable but bounded number of bytes; only the
// end of one packet tells where the next header is, and some bytes decide how
// many follow. The decoder therefore walks the stream byte by byte in a
// two-stage pipeline:
//   stage 1  registers the incoming byte (trace port capture);
//   stage 2  a state machine that recognises the header, counts or follows the
//            continuation bits of the payload bytes and, on the last byte of
//            the packet, emits one pft_pkt_t.
// After reset the decoder is unsynchronised and ignores everything until it
// sees an A-sync packet (at least five 0x00 bytes then 0x80). A reserved
// header means the packet boundaries are lost: the decoder reports PKT_BAD and
// waits for the next A-sync.
//
// Interface: in_valid/in_byte deliver one trace byte per clock (no back
// pressure). pkt_valid pulses for one cycle with pkt holding the packet; it
// rises on the clock edge after the one that samples the packet's last byte.
// synced is high while the packet boundaries are known.
//
// Which packets exist and what they carry (I-sync, branch address, waypoint
// update) follows the published architecture; the header values and payload layouts are
// those of the ARM PFT protocol it builds on. Design choices: no cycle-accurate
// tracing (atoms are one byte, no cycle counts), CID_BYTES context ID bytes in
// I-sync and context ID packets, exception information only after a five-byte
// branch address, one information byte after a five-byte waypoint address.
module pft_decoder
  import ptm_pkg::*;
#(
  parameter int unsigned CID_BYTES = 0   // context ID size configured in the PTM (0..4)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [7:0] in_byte,
  output logic       pkt_valid,
  output pft_pkt_t   pkt,
  output logic       synced
);

  typedef enum logic [3:0] {
    S_UNSYNC, S_HDR, S_ASYNC, S_ISYNC, S_ADDR, S_EXC, S_WPINFO, S_PAYLOAD, S_TS
  } state_e;

  // Stage 1: capture.
  logic       b_valid;
  logic [7:0] b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid <= 1'b0;
      b       <= '0;
    end else begin
      b_valid <= in_valid;
      b       <= in_byte;
    end
  end

  // Stage 2: packet state machine.
  state_e      state;
  logic [3:0]  cnt;      // bytes of the current packet consumed after the header
  logic [2:0]  zeros;    // run of 0x00 bytes, saturating at ASYNC_ZEROS
  pft_pkt_t    cur;      // packet being assembled

  localparam logic [3:0] ISYNC_LEN = 4'(5 + CID_BYTES);  // address + info + context ID

  // Puts the 7 (or, for the first byte, 6) payload bits of address byte idx
  // into the packed payload.
  function automatic logic [31:0] put_addr(logic [31:0] a, logic [2:0] idx, logic [6:0] v);
    logic [31:0] r;
    r = a;
    unique case (idx)
      3'd0: r[5:0]   = v[6:1];
      3'd1: r[12:6]  = v[6:0];
      3'd2: r[19:13] = v[6:0];
      3'd3: r[26:20] = v[6:0];
      default: ;
    endcase
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_UNSYNC;
      cnt       <= '0;
      zeros     <= '0;
      cur       <= '0;
      pkt_valid <= 1'b0;
      pkt       <= '0;
    end else begin
      pkt_valid <= 1'b0;
      if (b_valid) begin
        unique case (state)
          S_UNSYNC: begin
            if (b == HDR_ASYNC) begin
              if (zeros < 3'(ASYNC_ZEROS)) zeros <= zeros + 3'd1;
            end else begin
              zeros <= '0;
              if (b == ASYNC_END && zeros >= 3'(ASYNC_ZEROS)) begin
                state     <= S_HDR;
                pkt_valid <= 1'b1;
                pkt       <= '{ptype: PKT_ASYNC, info: b, default: '0};
              end
            end
          end

          S_HDR: begin
            cur <= '{ptype: PKT_BAD, info: b, default: '0};
            cnt <= '0;
            if (b[0]) begin
              // Branch address: the header is also the first address byte.
              cur.ptype  <= PKT_BRANCH;
              cur.addr   <= put_addr('0, 3'd0, b[6:0]);
              cur.nbytes <= 3'd1;
              if (b[7]) state <= S_ADDR;
              else begin
                pkt_valid <= 1'b1;
                pkt <= '{ptype: PKT_BRANCH, addr: put_addr('0, 3'd0, b[6:0]), nbytes: 3'd1,
                         info: b, default: '0};
              end
            end else if (b[7]) begin
              pkt_valid <= 1'b1;
              pkt       <= '{ptype: PKT_ATOM, info: b, default: '0};
            end else begin
              unique case (b)
                HDR_ASYNC: begin
                  zeros <= 3'd1;
                  state <= S_ASYNC;
                end
                HDR_ISYNC: begin
                  cur.ptype <= PKT_ISYNC;
                  state     <= S_ISYNC;
                end
                HDR_WPUPD: begin
                  cur.ptype <= PKT_WPUPD;
                  state     <= S_ADDR;
                end
                HDR_TRIGGER, HDR_EXCRET, HDR_IGNORE: begin
                  pkt_valid <= 1'b1;
                  pkt <= '{ptype: (b == HDR_TRIGGER) ? PKT_TRIGGER :
                                  (b == HDR_EXCRET)  ? PKT_EXCRET : PKT_IGNORE,
                           info: b, default: '0};
                end
                HDR_CID: begin
                  if (CID_BYTES == 0) begin
                    pkt_valid <= 1'b1;
                    pkt       <= '{ptype: PKT_CID, info: b, default: '0};
                  end else begin
                    cur.ptype <= PKT_CID;
                    state     <= S_PAYLOAD;
                  end
                end
                HDR_VMID: begin
                  cur.ptype <= PKT_VMID;
                  state     <= S_PAYLOAD;
                end
                HDR_TS0, HDR_TS1: begin
                  cur.ptype <= PKT_TS;
                  state     <= S_TS;
                end
                default: begin
                  pkt_valid <= 1'b1;
                  pkt       <= '{ptype: PKT_BAD, info: b, default: '0};
                  state     <= S_UNSYNC;
                  zeros     <= '0;
                end
              endcase
            end
          end

          S_ASYNC: begin
            if (b == HDR_ASYNC) begin
              if (zeros < 3'(ASYNC_ZEROS)) zeros <= zeros + 3'd1;
            end else begin
              zeros     <= '0;
              pkt_valid <= 1'b1;
              if (b == ASYNC_END && zeros >= 3'(ASYNC_ZEROS)) begin
                pkt   <= '{ptype: PKT_ASYNC, info: b, default: '0};
                state <= S_HDR;
              end else begin
                pkt   <= '{ptype: PKT_BAD, info: b, default: '0};
                state <= S_UNSYNC;
              end
            end
          end

          S_ISYNC: begin
            cnt <= cnt + 4'd1;
            unique case (cnt)
              4'd0: cur.addr[7:0]   <= b;
              4'd1: cur.addr[15:8]  <= b;
              4'd2: cur.addr[23:16] <= b;
              4'd3: cur.addr[31:24] <= b;
              4'd4: cur.info        <= b;
              default: ;
            endcase
            if (cnt == ISYNC_LEN - 4'd1) begin
              pkt_valid <= 1'b1;
              pkt       <= cur;
              if (cnt == 4'd4) pkt.info <= b;
              state     <= S_HDR;
            end
          end

          S_ADDR: begin
            // Address bytes after the header: the first byte of a waypoint
            // update address (cur.nbytes == 0) has the branch packet layout.
            if (cur.nbytes == 3'd4) begin
              // Fifth byte: no continuation bit, bit 6 flags what follows.
              cur.last   <= b;
              cur.nbytes <= 3'd5;
              if (b[6]) begin
                cur.exc <= (cur.ptype == PKT_BRANCH);
                state   <= (cur.ptype == PKT_BRANCH) ? S_EXC : S_WPINFO;
              end else begin
                pkt_valid <= 1'b1;
                pkt       <= cur;
                pkt.last  <= b;
                pkt.nbytes <= 3'd5;
                state     <= S_HDR;
              end
            end else begin
              cur.addr   <= put_addr(cur.addr, cur.nbytes, b[6:0]);
              cur.nbytes <= cur.nbytes + 3'd1;
              if (!b[7]) begin
                pkt_valid  <= 1'b1;
                pkt        <= cur;
                pkt.addr   <= put_addr(cur.addr, cur.nbytes, b[6:0]);
                pkt.nbytes <= cur.nbytes + 3'd1;
                state      <= S_HDR;
              end
            end
          end

          S_EXC: begin
            // Up to two exception information bytes, bit 7 = continuation.
            cnt <= cnt + 4'd1;
            if (cnt == 4'd0) cur.excnum[3:0] <= b[4:1];
            else             cur.excnum[8:4] <= b[4:0];
            if (!b[7] || cnt != 4'd0) begin
              pkt_valid <= 1'b1;
              pkt       <= cur;
              if (cnt == 4'd0) pkt.excnum[3:0] <= b[4:1];
              else             pkt.excnum[8:4] <= b[4:0];
              state     <= S_HDR;
            end
          end

          S_WPINFO: begin
            pkt_valid <= 1'b1;
            pkt       <= cur;
            pkt.info  <= b;
            state     <= S_HDR;
          end

          S_PAYLOAD: begin
            // Context ID (CID_BYTES bytes) or VMID (one byte).
            cnt <= cnt + 4'd1;
            if (cur.ptype == PKT_VMID || cnt == 4'(CID_BYTES) - 4'd1) begin
              pkt_valid <= 1'b1;
              pkt       <= cur;
              state     <= S_HDR;
            end
          end

          S_TS: begin
            // Up to nine bytes; bit 7 of the first eight is a continuation.
            cnt <= cnt + 4'd1;
            if (!b[7] || cnt == 4'd8) begin
              pkt_valid <= 1'b1;
              pkt       <= cur;
              state     <= S_HDR;
            end
          end

          default: state <= S_UNSYNC;
        endcase
      end
    end
  end

  assign synced = (state != S_UNSYNC);

  // I-sync and context ID packets carry at most four context ID bytes.
  initial assert (CID_BYTES <= 4) else $error("pft_decoder: CID_BYTES must be 0..4");

endmodule
