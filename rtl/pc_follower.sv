// pc_follower: rebuilds the program counter of the traced core at every
// waypoint from the decoded PFT packets.
//
// Three packet types move the PC, as in the published architecture: an I-sync packet loads
// the full address and the instruction set; a branch address packet and a
// waypoint update packet carry a compressed address, of which only the bits
// that changed since the last address are sent. The follower merges those
// bits into the last PC. The position of the bits depends on the instruction
// set (ARM: first byte gives PC[7:2]; Thumb: PC[6:1]), and a full five-byte
// address also carries the instruction set in its last byte, following the
// ARM PFT protocol. Until the first I-sync after (re)synchronisation the PC is
// unknown and no update is produced; a loss of synchronisation (PKT_BAD or a
// falling synced) invalidates it again.
//
// Interface: pkt_valid/pkt from pft_decoder; upd_valid pulses one cycle after
// the packet with the new PC in upd. pc/pc_valid show the current state.
// isa_err pulses when a five-byte address names an instruction set the
// follower does not handle (Jazelle or reserved); the PC is then invalidated.
module pc_follower
  import ptm_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     synced,
  input  logic     pkt_valid,
  input  pft_pkt_t pkt,
  output logic     upd_valid,
  output pc_upd_t  upd,
  output logic     pc_valid,
  output logic     isa_err
);

  logic [31:0] pc_q;
  isa_e        isa_q;

  // Merge a compressed address into the previous PC.
  function automatic logic [31:0] merge(logic [31:0] prev, isa_e isa,
                                        logic [26:0] payload, logic [2:0] nbytes);
    logic [31:0] mask, bits;
    int unsigned nb;
    nb   = 6 + 7 * (int'(nbytes) - 1);                 // payload bits present
    mask = (32'h1 << nb) - 32'h1;
    if (isa == ISA_ARM) begin
      bits = {3'b0, payload, 2'b00};
      mask = mask << 2;
      return ((prev & ~mask) | (bits & mask)) & 32'hFFFF_FFFC;
    end else begin
      bits = {4'b0, payload, 1'b0};
      mask = mask << 1;
      return ((prev & ~mask) | (bits & mask)) & 32'hFFFF_FFFE;
    end
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q      <= '0;
      isa_q     <= ISA_ARM;
      pc_valid  <= 1'b0;
      upd_valid <= 1'b0;
      upd       <= '0;
      isa_err   <= 1'b0;
    end else begin
      upd_valid <= 1'b0;
      isa_err   <= 1'b0;
      if (!synced) begin
        pc_valid <= 1'b0;
      end else if (pkt_valid) begin
        unique case (pkt.ptype)
          PKT_ISYNC: begin
            pc_q      <= {pkt.addr[31:1], 1'b0};
            isa_q     <= pkt.addr[0] ? ISA_THUMB : ISA_ARM;
            pc_valid  <= 1'b1;
            upd_valid <= 1'b1;
            upd       <= '{pc: {pkt.addr[31:1], 1'b0}, isa: pkt.addr[0] ? ISA_THUMB : ISA_ARM};
          end
          PKT_BRANCH, PKT_WPUPD: begin
            if (pkt.nbytes == 3'd5) begin
              if (pkt.last[5:3] == 3'b001) begin
                pc_q      <= {pkt.last[2:0], pkt.addr[26:0], 2'b00};
                isa_q     <= ISA_ARM;
                upd_valid <= pc_valid;
                upd       <= '{pc: {pkt.last[2:0], pkt.addr[26:0], 2'b00}, isa: ISA_ARM};
              end else if (pkt.last[5:4] == 2'b01) begin
                pc_q      <= {pkt.last[3:0], pkt.addr[26:0], 1'b0};
                isa_q     <= ISA_THUMB;
                upd_valid <= pc_valid;
                upd       <= '{pc: {pkt.last[3:0], pkt.addr[26:0], 1'b0}, isa: ISA_THUMB};
              end else begin
                isa_err  <= 1'b1;
                pc_valid <= 1'b0;
              end
            end else begin
              pc_q      <= merge(pc_q, isa_q, pkt.addr[26:0], pkt.nbytes);
              upd_valid <= pc_valid;
              upd       <= '{pc: merge(pc_q, isa_q, pkt.addr[26:0], pkt.nbytes), isa: isa_q};
            end
          end
          PKT_BAD: pc_valid <= 1'b0;
          default: ;
        endcase
      end
    end
  end

endmodule
