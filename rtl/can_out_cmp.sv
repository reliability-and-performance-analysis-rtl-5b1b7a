// can_out_cmp: comparator of two controller replicas.
//
// Compares every field of two `can_out_t` bundles (bus line, host outputs,
// status and event pulses) and raises `mismatch_o` in the same cycle when
// any bit differs. `diff_o` marks which fields differ (bus line, host
// interface, error counters/state, event pulses) to help diagnosis.
// It is the comparator of the duplex-with-comparison structure and, used
// again over two pairs, the comparator between the pairs.
module can_out_cmp
  import can_pkg::*;
(
  input  can_out_t   a,
  input  can_out_t   b,
  output logic       mismatch_o,
  output logic [3:0] diff_o       // {events, error status, host side, bus}
);

  always_comb begin
    diff_o[0] = (a.tx != b.tx);
    diff_o[1] = (a.tx_busy != b.tx_busy) || (a.sndok != b.sndok) ||
                (a.rx_valid != b.rx_valid) || (a.rx_overrun != b.rx_overrun) ||
                (a.rx_msg != b.rx_msg);
    diff_o[2] = (a.err_state != b.err_state) || (a.tec != b.tec) || (a.rec != b.rec);
    diff_o[3] = (a.err_evt != b.err_evt) || (a.err_kind != b.err_kind) ||
                (a.arb_lost != b.arb_lost) || (a.ovl_evt != b.ovl_evt);
    mismatch_o = |diff_o;
  end

endmodule
