// hs_pkg: types shared by the handshake case study.
//
// hs_err_t collects the verdicts of the three correctness properties of the
// sender/receiver pair (see hs_monitor). A set bit means the property was
// violated at least once since reset.
package hs_pkg;

  typedef struct packed {
    logic correct_transfer;   // valid delivered data other than the last item sent
    logic no_blocked_transfer;// a sent item was not delivered within the bound
    logic sender_handshake;   // busy was not high one tick after send
  } hs_err_t;

endpackage
