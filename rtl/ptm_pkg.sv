// ptm_pkg: types and constants shared by the PTM trace monitor.
//
// The monitor decodes the byte stream of an ARM Program Trace Macrocell (PTM),
// which follows the ARM Program Flow Trace (PFT) protocol. The packet header
// values below are those of the PFT protocol (A-sync, I-sync, branch address,
// waypoint update, atom, trigger, context ID, VMID, timestamp, exception
// return, ignore); the monitor relies on them to delimit every packet.
// The decoder hands one pft_pkt_t per decoded packet to the PC follower, and
// the follower hands one pc_upd_t per waypoint to the range checker.
package ptm_pkg;

  // PFT header bytes with a fixed value.
  localparam logic [7:0] HDR_ASYNC   = 8'h00;
  localparam logic [7:0] ASYNC_END   = 8'h80;
  localparam logic [7:0] HDR_ISYNC   = 8'h08;
  localparam logic [7:0] HDR_TRIGGER = 8'h0C;
  localparam logic [7:0] HDR_VMID    = 8'h3C;
  localparam logic [7:0] HDR_TS0     = 8'h42;
  localparam logic [7:0] HDR_TS1     = 8'h46;
  localparam logic [7:0] HDR_IGNORE  = 8'h66;
  localparam logic [7:0] HDR_CID     = 8'h6E;
  localparam logic [7:0] HDR_WPUPD   = 8'h72;
  localparam logic [7:0] HDR_EXCRET  = 8'h76;

  // Minimum number of 0x00 bytes before 0x80 that forms an A-sync packet.
  localparam int unsigned ASYNC_ZEROS = 5;

  typedef enum logic [3:0] {
    PKT_ASYNC,
    PKT_ISYNC,
    PKT_BRANCH,
    PKT_WPUPD,
    PKT_ATOM,
    PKT_TRIGGER,
    PKT_CID,
    PKT_VMID,
    PKT_TS,
    PKT_EXCRET,
    PKT_IGNORE,
    PKT_BAD        // reserved header: the decoder has lost the packet boundaries
  } pkt_type_e;

  // Instruction set state carried by the trace.
  typedef enum logic [1:0] {
    ISA_ARM   = 2'd0,
    ISA_THUMB = 2'd1,
    ISA_OTHER = 2'd2   // Jazelle or a reserved encoding: not followed
  } isa_e;

  // One decoded packet.
  //   ISYNC          : addr = full 32-bit address, bit 0 is the Thumb bit;
  //                    info = information byte.
  //   BRANCH / WPUPD : addr[26:0] = address payload bits packed low first
  //                    (6 bits from the first address byte, 7 from each of
  //                    the next three); nbytes = address bytes (1..5);
  //                    last = fifth address byte (valid when nbytes == 5);
  //                    exc = exception bytes present, excnum = their payload.
  //   others         : raw header in info.
  typedef struct packed {
    pkt_type_e   ptype;
    logic [31:0] addr;
    logic [2:0]  nbytes;
    logic [7:0]  last;
    logic        exc;
    logic [8:0]  excnum;
    logic [7:0]  info;
  } pft_pkt_t;

  // One PC update produced at a waypoint.
  typedef struct packed {
    logic [31:0] pc;
    isa_e        isa;
  } pc_upd_t;

endpackage
