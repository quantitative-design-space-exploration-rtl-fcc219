// network_interface: gateway between a functional unit and the local port
// of its routing-switch.
//
// Sending: the functional unit raises tx_valid with a destination
// (tx_dest_x/y) and a word count tx_len (at least 1), and holds them until
// tx_done. The interface raises req towards the switch with a head word
// (destination and own position) and waits. On ack the connection stands:
// it reads one word per cycle from the functional unit (tx_rd, data expected
// on tx_data in the same cycle) and sends it with valid. After the last word
// it drops req and, once ack has fallen, pulses tx_done. On nack the
// transfer is abandoned: req drops, tx_retry pulses, and after BACKOFF plus a
// pseudo-random 0..15 cycles the set-up is tried again.
// Receiving: a request on the switch's local output is always accepted; ack
// is raised one cycle later and held until the request drops. Each word with
// valid appears on rx_valid/rx_data with its sender on rx_src_x/y; rx_busy is
// high while a connection is open. rx_data is the link's data passed
// straight through (qualified by rx_valid), and net_in_nack is tied to 0
// because the receiving side never refuses a connection.
// That the interface restarts refused transfers later follows the paper; the
// functional-unit handshake, the back-off rule and the head-word layout are
// this design's choices.
module network_interface
  import noc_pkg::*;
#(
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned LEN_W   = 8,
  parameter int unsigned BACKOFF = 8,
  parameter int unsigned MY_X    = 0,
  parameter int unsigned MY_Y    = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  // functional unit, sending side
  input  logic               tx_valid,
  input  logic [COORD_W-1:0] tx_dest_x,
  input  logic [COORD_W-1:0] tx_dest_y,
  input  logic [LEN_W-1:0]   tx_len,
  output logic               tx_rd,
  input  logic [DATA_W-1:0]  tx_data,
  output logic               tx_done,
  output logic               tx_retry,
  // functional unit, receiving side
  output logic               rx_valid,
  output logic [DATA_W-1:0]  rx_data,
  output logic [COORD_W-1:0] rx_src_x,
  output logic [COORD_W-1:0] rx_src_y,
  output logic               rx_busy,
  // to the switch's local input port
  output logic               net_out_req,
  output logic               net_out_valid,
  output logic [DATA_W-1:0]  net_out_data,
  input  logic               net_out_ack,
  input  logic               net_out_nack,
  // from the switch's local output port
  input  logic               net_in_req,
  input  logic               net_in_valid,
  input  logic [DATA_W-1:0]  net_in_data,
  output logic               net_in_ack,
  output logic               net_in_nack
);

  typedef enum logic [2:0] {TX_IDLE, TX_SETUP, TX_SEND, TX_CLOSE, TX_ABORT, TX_BACKOFF} tx_state_e;

  tx_state_e          tx_state;
  logic [LEN_W-1:0]   cnt;
  logic [7:0]         wait_cnt;
  logic [7:0]         lfsr;
  logic [COORD_W-1:0] dx, dy;
  head_t              head;

  always_comb begin
    head        = '0;
    head.dest_x = dx;
    head.dest_y = dy;
    head.src_x  = COORD_W'(MY_X);
    head.src_y  = COORD_W'(MY_Y);
  end

  assign net_out_req   = (tx_state == TX_SETUP) || (tx_state == TX_SEND);
  assign net_out_valid = (tx_state == TX_SEND);
  assign tx_rd         = (tx_state == TX_SEND);
  assign net_out_data  = (tx_state == TX_SEND) ? tx_data : DATA_W'(head);
  assign tx_done       = (tx_state == TX_CLOSE) && !net_out_ack;
  assign tx_retry      = (tx_state == TX_SETUP) && net_out_nack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_state <= TX_IDLE;
      cnt      <= '0;
      wait_cnt <= '0;
      dx       <= '0;
      dy       <= '0;
      lfsr     <= 8'(MY_Y * 16 + MY_X + 1);
    end else begin
      lfsr <= {lfsr[6:0], lfsr[7] ^ lfsr[5] ^ lfsr[4] ^ lfsr[3]};
      unique case (tx_state)
        TX_IDLE: if (tx_valid) begin
          dx       <= tx_dest_x;
          dy       <= tx_dest_y;
          tx_state <= TX_SETUP;
        end
        TX_SETUP: begin
          if (net_out_ack) begin
            cnt      <= '0;
            tx_state <= TX_SEND;
          end else if (net_out_nack) begin
            tx_state <= TX_ABORT;
          end
        end
        TX_SEND: begin
          cnt <= cnt + 1'b1;
          if (cnt + 1'b1 >= tx_len) tx_state <= TX_CLOSE;
        end
        TX_CLOSE: if (!net_out_ack) tx_state <= TX_IDLE;
        TX_ABORT: if (!net_out_nack) begin
          wait_cnt <= 8'(BACKOFF) + {4'd0, lfsr[3:0]};
          tx_state <= TX_BACKOFF;
        end
        TX_BACKOFF: begin
          if (wait_cnt == '0) tx_state <= TX_SETUP;
          else                wait_cnt <= wait_cnt - 1'b1;
        end
        default: tx_state <= TX_IDLE;
      endcase
    end
  end

  // Receiving side.
  logic rx_open;
  head_t in_head;
  assign in_head = head_t'(net_in_data[HEAD_W-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_open  <= 1'b0;
      rx_src_x <= '0;
      rx_src_y <= '0;
    end else if (!rx_open && net_in_req) begin
      rx_open  <= 1'b1;
      rx_src_x <= in_head.src_x;
      rx_src_y <= in_head.src_y;
    end else if (rx_open && !net_in_req) begin
      rx_open  <= 1'b0;
    end
  end

  assign net_in_ack  = rx_open;
  assign net_in_nack = 1'b0;
  assign rx_busy     = rx_open;
  assign rx_valid    = rx_open && net_in_req && net_in_valid;
  assign rx_data     = net_in_data;

  a_len: assert property (@(posedge clk) disable iff (!rst_n)
    (tx_state == TX_IDLE && tx_valid) |-> (tx_len != '0));

endmodule
