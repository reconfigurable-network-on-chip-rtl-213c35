// network_interface: connects one processor to the local port of its router.
//
// Send side (blocking send): the processor offers data words with a
// valid/ready handshake, the destination node on tx_dest and tx_last on the
// final word. The interface first injects a header flit carrying tx_dest,
// then one normal flit per word, the last word as the tail flit. tx_ready
// stays low while the header goes out and whenever the router's local input
// buffer is full, so the processor is held until the network takes its data.
// A packet holds at least one word (header plus tail).
//
// Receive side (blocking receive): the interface pulls flits from the
// router's output buffer whenever its one-word holding register is free (or
// being emptied), drops the header and presents each data word on rx_data
// with rx_valid; rx_last marks the word that came in the tail flit.
//
// The design names this block and leaves its architecture open; the
// valid/ready processor interface, the header-first packetisation and the
// one-word receive register are this implementation's choices.
//
// Timing: a packet of L words occupies the router input for L+1 cycles at
// best; a received word is on rx_data the cycle after it leaves the router.
module network_interface (
  input  logic                        clk,
  input  logic                        rst_n,
  // processor send
  input  logic                        tx_valid,
  input  logic [noc_pkg::ADDR_W-1:0]  tx_dest,
  input  logic [noc_pkg::DATA_W-1:0]  tx_data,
  input  logic                        tx_last,
  output logic                        tx_ready,
  // processor receive
  output logic                        rx_valid,
  output logic [noc_pkg::DATA_W-1:0]  rx_data,
  output logic                        rx_last,
  input  logic                        rx_ready,
  // router local input (channel 0)
  output logic                        net_wr_req,
  output noc_pkg::flit_t              net_wr_flit,
  input  logic                        net_wr_ack,
  // router local output buffer
  input  logic                        net_rd_ack,
  input  noc_pkg::flit_t              net_rd_flit,
  output logic                        net_rd_req
);
  import noc_pkg::*;

  typedef enum logic { TX_HEAD, TX_DATA } tx_state_e;
  tx_state_e tx_state;

  // ------------------------------------------------------------------ send
  always_comb begin
    net_wr_req = tx_valid;
    if (tx_state == TX_HEAD) begin
      net_wr_flit.ftype = FT_HEAD;
      net_wr_flit.data  = DATA_W'(tx_dest);
      tx_ready          = 1'b0;
    end else begin
      net_wr_flit.ftype = tx_last ? FT_TAIL : FT_BODY;
      net_wr_flit.data  = tx_data;
      tx_ready          = net_wr_ack;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_state <= TX_HEAD;
    end else if (tx_valid && net_wr_ack) begin
      if (tx_state == TX_HEAD) tx_state <= TX_DATA;
      else if (tx_last)        tx_state <= TX_HEAD;
    end
  end

  // --------------------------------------------------------------- receive
  logic rx_full;
  assign rx_valid   = rx_full;
  assign net_rd_req = !rx_full || rx_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_full <= 1'b0;
      rx_data <= '0;
      rx_last <= 1'b0;
    end else begin
      if (net_rd_ack && net_rd_flit.ftype != FT_HEAD) begin
        rx_full <= 1'b1;
        rx_data <= net_rd_flit.data;
        rx_last <= (net_rd_flit.ftype == FT_TAIL);
      end else if (rx_ready) begin
        rx_full <= 1'b0;
      end
    end
  end

  a_tx_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (tx_valid && !tx_ready) |=> tx_valid);
endmodule
