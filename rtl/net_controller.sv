// net_controller: the network controller (netController), the engine that
// decides whether a received packet authorises a change of the appliance.
//
// It runs at a reduced rate: its state advances only on clock cycles where
// tick is high (one in 1024 from clk_div). Each pass:
//   1. wait for a packet. With SLIP = 0 (Ethernet link) it polls the
//      Ethernet interface (poll_req/poll_ack, pkt_avail) and, when a frame
//      is waiting, asks for it to be copied into the packet buffer
//      (load_req/load_ack). With SLIP = 1 it waits for the SLIP interface's
//      pkt_ready pulse, which is caught at full clock rate.
//   2. read the packet by random access: the IP header length (IHL) at the
//      start of the IP header, which is LINK_HDR bytes into the buffer; the
//      UDP length at IHL*4+4; then the KEY_LEN payload bytes at IHL*4+8,
//      compared in turn with the secret key KEY (first byte in KEY's most
//      significant byte).
//   3. if every key byte matches (and IHL >= 5 and the UDP length covers the
//      key) the appliance state flips: appliance_off toggles and key_match
//      pulses for one tick. Any other packet is ignored.
// Other header fields are not looked at, so packets from any source to any
// destination are accepted.
//
// Buffer read port: rd_addr is held for a whole tick period and rd_data is
// taken on the next tick; a byte with rd_valid low is read again.
// pkt_checked pulses (one tick) for every packet examined.
//
// The polling, the load request, the use of header lengths as offsets into
// the buffer, the secret-key test on the UDP payload and the toggle follow
// the design description. The key's length and value, the exact fields
// read and the handshakes are this design's choices.
module net_controller
  import netcon_pkg::*;
#(
  parameter bit                  SLIP     = 1'b0,
  parameter int unsigned         LINK_HDR = SLIP ? 0 : ETH_HDR_LEN,
  parameter int unsigned         KEY_LEN  = 8,
  parameter logic [8*KEY_LEN-1:0] KEY     = "REBOOTPC",
  parameter int unsigned         AW       = BUF_AW
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          tick,
  // Ethernet interface handshakes
  output logic          poll_req,
  input  logic          poll_ack,
  input  logic          pkt_avail,
  output logic          load_req,
  input  logic          load_ack,
  // SLIP interface packet-received pulse
  input  logic          pkt_ready,
  // packet buffer read port
  output logic [AW-1:0] rd_addr,
  input  logic [7:0]    rd_data,
  input  logic          rd_valid,
  // appliance
  output logic          appliance_off,
  output logic          key_match,
  output logic          pkt_checked
);
  typedef enum logic [3:0] {
    S_IDLE, S_POLL, S_POLL_WAIT, S_LOAD, S_LOAD_WAIT,
    S_IHL, S_ULEN_H, S_ULEN_L, S_CMP, S_DONE
  } state_t;

  localparam int unsigned KW = $clog2(KEY_LEN + 1);

  state_t        st;
  logic          slip_pending;
  logic [AW-1:0] udp_base;
  logic [7:0]    ulen_h;
  logic [KW-1:0] k;
  logic          ok;

  // key byte k, first byte in the most significant position
  function automatic logic [7:0] key_byte(input logic [KW-1:0] i);
    return KEY[8*(KEY_LEN-1-int'(i)) +: 8];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      st            <= S_IDLE;
      slip_pending  <= 1'b0;
      udp_base      <= '0;
      ulen_h        <= '0;
      k             <= '0;
      ok            <= 1'b0;
      poll_req      <= 1'b0;
      load_req      <= 1'b0;
      rd_addr       <= '0;
      appliance_off <= 1'b0;
      key_match     <= 1'b0;
      pkt_checked   <= 1'b0;
    end else begin
      if (SLIP && pkt_ready) slip_pending <= 1'b1;
      if (tick) begin
        key_match   <= 1'b0;
        pkt_checked <= 1'b0;
        unique case (st)
          S_IDLE: begin
            if (SLIP) begin
              if (slip_pending || pkt_ready) begin
                slip_pending <= 1'b0;
                rd_addr      <= AW'(LINK_HDR);
                st           <= S_IHL;
              end
            end else begin
              st <= S_POLL;
            end
          end
          S_POLL: if (!poll_ack && !load_ack) begin
            poll_req <= 1'b1;
            st       <= S_POLL_WAIT;
          end
          S_POLL_WAIT: if (poll_ack) begin
            poll_req <= 1'b0;
            st       <= pkt_avail ? S_LOAD : S_IDLE;
          end
          S_LOAD: if (!poll_ack && !load_ack) begin
            load_req <= 1'b1;
            st       <= S_LOAD_WAIT;
          end
          S_LOAD_WAIT: if (load_ack) begin
            load_req <= 1'b0;
            rd_addr  <= AW'(LINK_HDR);
            st       <= S_IHL;
          end
          S_IHL: if (rd_valid) begin
            // UDP header starts IHL 32-bit words after the IP header
            udp_base <= AW'(LINK_HDR) + AW'({rd_data[3:0], 2'b00});
            rd_addr  <= AW'(LINK_HDR) + AW'({rd_data[3:0], 2'b00}) + AW'(4);
            ok       <= (rd_data[3:0] >= 4'd5);
            st       <= S_ULEN_H;
          end
          S_ULEN_H: if (rd_valid) begin
            ulen_h  <= rd_data;
            rd_addr <= udp_base + AW'(5);
            st      <= S_ULEN_L;
          end
          S_ULEN_L: if (rd_valid) begin
            if ({ulen_h, rd_data} < 16'(UDP_HDR_LEN + KEY_LEN)) ok <= 1'b0;
            rd_addr <= udp_base + AW'(UDP_HDR_LEN);
            k       <= '0;
            st      <= S_CMP;
          end
          S_CMP: if (rd_valid) begin
            if (rd_data != key_byte(k)) ok <= 1'b0;
            if (k == KW'(KEY_LEN - 1)) begin
              st <= S_DONE;
            end else begin
              k       <= k + 1'b1;
              rd_addr <= rd_addr + 1'b1;
            end
          end
          S_DONE: begin
            pkt_checked <= 1'b1;
            if (ok) begin
              key_match     <= 1'b1;
              appliance_off <= !appliance_off;
            end
            st <= S_IDLE;
          end
          default: st <= S_IDLE;
        endcase
      end
    end
  end

  // handshake rules: one request at a time, and a request is only withdrawn
  // after it has been acknowledged
  a_one_request: assert property (@(posedge clk) disable iff (rst) !(poll_req && load_req));
  a_poll_held:   assert property (@(posedge clk) disable iff (rst) $fell(poll_req) |-> $past(poll_ack));
  a_load_held:   assert property (@(posedge clk) disable iff (rst) $fell(load_req) |-> $past(load_ack));
endmodule
