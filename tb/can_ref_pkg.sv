// can_ref_pkg: reference model of CAN 2.0A frames for the testbenches.
//
// Builds the exact bus bit sequence of a standard data or remote frame
// from its fields, independently of the RTL: the CRC is computed by
// polynomial long division of the frame bits times x^15 by the generator
// x^15+x^14+x^10+x^8+x^7+x^4+x^3+1, and stuff bits are inserted after every
// five equal bits from start of frame to the end of the CRC field.
package can_ref_pkg;

  typedef bit bitq_t[$];

  // remainder of (msg * x^15) mod G, by long division on a bit array
  function automatic bit [14:0] ref_crc(bitq_t msg);
    bit work[$];
    bit [15:0] g = 16'b1100_0101_1001_1001; // x^15 + 0x4599
    work = msg;
    for (int i = 0; i < 15; i++) work.push_back(1'b0);
    for (int i = 0; i + 15 < work.size(); i++) begin
      if (work[i]) for (int j = 0; j < 16; j++) work[i+j] ^= g[15-j];
    end
    ref_crc = '0;
    for (int j = 0; j < 15; j++) ref_crc[14-j] = work[work.size()-15+j];
  endfunction

  // unstuffed bits from SOF to the last data bit
  function automatic bitq_t frame_body(bit [10:0] id, bit rtr, bit [3:0] dlc,
                                       bit [63:0] data);
    bitq_t q;
    int nbytes;
    q.push_back(1'b0);                                  // SOF
    for (int i = 10; i >= 0; i--) q.push_back(id[i]);
    q.push_back(rtr);
    q.push_back(1'b0);                                  // IDE
    q.push_back(1'b0);                                  // r0
    for (int i = 3; i >= 0; i--) q.push_back(dlc[i]);
    nbytes = rtr ? 0 : (dlc > 8 ? 8 : int'(dlc));
    for (int i = 0; i < nbytes * 8; i++) q.push_back(data[63-i]);
    return q;
  endfunction

  // stuffed bus bits from SOF to the end of the CRC field
  // (crc_flip: bits of the CRC field to invert, to build a corrupted frame)
  function automatic bitq_t frame_stuffed(bit [10:0] id, bit rtr, bit [3:0] dlc,
                                          bit [63:0] data, bit [14:0] crc_flip = '0);
    bitq_t body, q;
    bit [14:0] crc;
    int run;
    bit last;
    body = frame_body(id, rtr, dlc, data);
    crc  = ref_crc(body) ^ crc_flip;
    for (int i = 14; i >= 0; i--) body.push_back(crc[i]);
    run = 0;
    last = 1'b1;
    foreach (body[i]) begin
      q.push_back(body[i]);
      if (run > 0 && body[i] == last) run++;
      else begin run = 1; last = body[i]; end
      if (run == 5) begin
        q.push_back(!last);
        last = !last;
        run = 1;
      end
    end
    return q;
  endfunction

  // full frame as sent by the transmitter: stuffed part, CRC delimiter,
  // ACK slot (recessive from the transmitter), ACK delimiter, 7 EOF bits
  function automatic bitq_t frame_tx(bit [10:0] id, bit rtr, bit [3:0] dlc,
                                     bit [63:0] data);
    bitq_t q;
    q = frame_stuffed(id, rtr, dlc, data);
    repeat (10) q.push_back(1'b1);
    return q;
  endfunction

endpackage
