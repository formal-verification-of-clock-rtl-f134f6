// hs_monitor: synthesizable checker for the handshake case study.
//
// Watches the two local interfaces of a sender/receiver pair and flags
// violations of its three correctness properties, one sticky bit each:
//   correct_transfer    - whenever valid is high, data_out equals data_in
//                         as it was on the last tick where send was high;
//   no_blocked_transfer - every send is followed by a valid; "finite time"
//                         is made concrete as BOUND base-clock cycles;
//   sender_handshake    - busy is high on the sender tick after a send.
// The properties only speak about the interfaces, not about how the
// crossing works. send/busy are sampled on sender ticks (ce_s) and
// valid/data_out on receiver ticks (ce_r) of the shared base clock, so each
// domain cycle is looked at once. `n_valid` counts delivered items and
// `n_send` accepted sends, for progress reporting.
module hs_monitor
  import hs_pkg::*;
#(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned BOUND  = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce_s,
  input  logic              ce_r,
  input  logic              send,
  input  logic [DATA_W-1:0] data_in,
  input  logic              busy,
  input  logic              valid,
  input  logic [DATA_W-1:0] data_out,
  output hs_err_t           err,
  output logic [31:0]       n_send,
  output logic [31:0]       n_valid
);
  logic [DATA_W-1:0] last_sent;
  logic              sent_any;
  logic              pending;
  logic [$clog2(BOUND+1)-1:0] wait_cnt;
  logic              hs_chk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err       <= '0;
      last_sent <= '0;
      sent_any  <= 1'b0;
      pending   <= 1'b0;
      wait_cnt  <= '0;
      hs_chk    <= 1'b0;
      n_send    <= '0;
      n_valid   <= '0;
    end else begin
      // correct transfer (checked against the previous send)
      if (ce_r && valid) begin
        n_valid <= n_valid + 1;
        if (!sent_any || data_out != last_sent) err.correct_transfer <= 1'b1;
      end
      // sender handshake
      if (ce_s) begin
        if (hs_chk && !busy) err.sender_handshake <= 1'b1;
        hs_chk <= send;
      end
      if (ce_s && send) begin
        last_sent <= data_in;
        sent_any  <= 1'b1;
        n_send    <= n_send + 1;
      end
      // no blocked transfer
      if (ce_s && send) begin
        pending  <= 1'b1;
        wait_cnt <= '0;
      end else if (ce_r && valid) begin
        pending  <= 1'b0;
      end else if (pending) begin
        if (wait_cnt == BOUND[$bits(wait_cnt)-1:0]) err.no_blocked_transfer <= 1'b1;
        else wait_cnt <= wait_cnt + 1'b1;
      end
    end
  end
endmodule
