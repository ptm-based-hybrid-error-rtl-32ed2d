// pft_enc_pkg: PFT packet encoder used by the testbenches to build trace byte
// streams. It writes packets the way a PTM would (A-sync, I-sync, branch
// address with address compression, waypoint update, atom and the short
// packets), independently of the monitor's decoder, so that the decoder and
// the PC follower can be checked against it.
package pft_enc_pkg;

  typedef logic [7:0] bq_t[$];

  function automatic void push_async(inout bq_t q);
    repeat (5) q.push_back(8'h00);
    q.push_back(8'h80);
  endfunction

  // I-sync: header, address (bit 0 = Thumb), information byte, context ID.
  function automatic void push_isync(inout bq_t q, input logic [31:0] addr,
                                     input logic [7:0] info, input int cid_bytes);
    q.push_back(8'h08);
    for (int k = 0; k < 4; k++) q.push_back(addr[8*k +: 8]);
    q.push_back(info);
    for (int k = 0; k < cid_bytes; k++) q.push_back(8'(k + 8'hA0));
  endfunction

  // Address bytes of a branch address or waypoint update packet.
  // payload holds the packed address bits (6 in the first byte, 7 in each of
  // the next three); last is the fifth byte, used when nbytes == 5.
  function automatic void push_addr(inout bq_t q, input int nbytes,
                                    input logic [26:0] payload, input logic [7:0] last);
    logic c;
    c = (nbytes > 1);
    q.push_back({c, payload[5:0], 1'b1});
    for (int k = 1; k < nbytes && k < 4; k++) begin
      c = (k < nbytes - 1);
      q.push_back({c, payload[6 + 7*(k-1) +: 7]});
    end
    if (nbytes == 5) q.push_back(last);
  endfunction

  // Exception information bytes (one or two) after a five-byte branch address.
  function automatic void push_exc(inout bq_t q, input logic [8:0] excnum, input bit two);
    q.push_back({two, 2'b00, excnum[3:0], 1'b0});
    if (two) q.push_back({3'b000, excnum[8:4]});
  endfunction

  // Fifth address byte for a full address of instruction set thumb.
  function automatic logic [7:0] fifth(logic [31:0] pc, bit thumb, bit flag);
    return thumb ? {1'b0, flag, 2'b01, pc[31:28]} : {1'b0, flag, 3'b001, pc[31:29]};
  endfunction

  // Compressed encoding of a branch to new_pc, given the previous PC and
  // instruction set: the fewest address bytes whose payload, merged into the
  // previous PC, gives new_pc; a change of instruction set needs all five.
  function automatic int addr_bytes(logic [31:0] prev, bit prev_thumb,
                                    logic [31:0] new_pc, bit thumb);
    int sh, hi;
    if (prev_thumb != thumb) return 5;
    sh = thumb ? 1 : 2;
    for (int n = 1; n <= 4; n++) begin
      hi = sh + 6 + 7*(n-1);                // first bit not carried
      if ((prev >> hi) == (new_pc >> hi)) return n;
    end
    return 5;
  endfunction

  function automatic logic [26:0] addr_payload(logic [31:0] pc, bit thumb);
    return thumb ? pc[27:1] : pc[28:2];
  endfunction

endpackage
