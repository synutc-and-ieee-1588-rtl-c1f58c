// uart - RS232 serial port to the GPS timing receiver (8N1).
//
// Transmitter: tx_start with tx_data loads a start bit, 8 data bits LSB first
// and a stop bit; each bit lasts DIV clock cycles; tx_busy is high meanwhile.
// Receiver: rxd is synchronised by two flops; a falling edge starts a frame, each
// bit is sampled in the middle of its DIV-cycle period, and rx_valid pulses for
// one cycle with rx_data when a valid stop bit is seen (a low stop bit sets
// rx_err for one cycle instead).
// The document only names an RS232 interface to the GPS receiver; frame format
// and bit timing are this design's choices (DIV = 868: 115200 baud at 100 MHz).
module uart #(
  parameter int unsigned DIV = 868
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] tx_data,
  input  logic       tx_start,
  output logic       tx_busy,
  output logic       txd,
  input  logic       rxd,
  output logic [7:0] rx_data,
  output logic       rx_valid,
  output logic       rx_err
);

  localparam int unsigned CW = $clog2(DIV + 1);

  // ---------------- transmitter ----------------
  logic [9:0]    tx_sh_q;
  logic [3:0]    tx_bits_q;
  logic [CW-1:0] tx_cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sh_q   <= '1;
      tx_bits_q <= '0;
      tx_cnt_q  <= '0;
    end else if (tx_bits_q == 0) begin
      if (tx_start) begin
        tx_sh_q   <= {1'b1, tx_data, 1'b0};
        tx_bits_q <= 4'd10;
        tx_cnt_q  <= CW'(DIV - 1);
      end
    end else if (tx_cnt_q == 0) begin
      tx_sh_q   <= {1'b1, tx_sh_q[9:1]};
      tx_bits_q <= tx_bits_q - 1'b1;
      tx_cnt_q  <= CW'(DIV - 1);
    end else begin
      tx_cnt_q <= tx_cnt_q - 1'b1;
    end
  end

  assign txd     = tx_sh_q[0];
  assign tx_busy = (tx_bits_q != 0);

  // ---------------- receiver ----------------
  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  rx_state_e     rx_st_q;
  logic          r1_q, r2_q;
  logic [CW-1:0] rx_cnt_q;
  logic [2:0]    rx_bit_q;
  logic [7:0]    rx_sh_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_q     <= 1'b1;
      r2_q     <= 1'b1;
      rx_st_q  <= RX_IDLE;
      rx_cnt_q <= '0;
      rx_bit_q <= '0;
      rx_sh_q  <= '0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
      rx_err   <= 1'b0;
    end else begin
      r1_q     <= rxd;
      r2_q     <= r1_q;
      rx_valid <= 1'b0;
      rx_err   <= 1'b0;
      if (rx_cnt_q != 0) rx_cnt_q <= rx_cnt_q - 1'b1;
      unique case (rx_st_q)
        RX_IDLE: if (!r2_q) begin
          rx_st_q  <= RX_START;
          rx_cnt_q <= CW'(DIV / 2 - 1);
        end
        RX_START: if (rx_cnt_q == 0) begin
          if (r2_q) rx_st_q <= RX_IDLE;       // glitch, not a start bit
          else begin
            rx_st_q  <= RX_DATA;
            rx_cnt_q <= CW'(DIV - 1);
            rx_bit_q <= '0;
          end
        end
        RX_DATA: if (rx_cnt_q == 0) begin
          rx_sh_q  <= {r2_q, rx_sh_q[7:1]};
          rx_cnt_q <= CW'(DIV - 1);
          rx_bit_q <= rx_bit_q + 1'b1;
          if (rx_bit_q == 3'd7) rx_st_q <= RX_STOP;
        end
        RX_STOP: if (rx_cnt_q == 0) begin
          rx_st_q <= RX_IDLE;
          if (r2_q) begin
            rx_data  <= rx_sh_q;
            rx_valid <= 1'b1;
          end else begin
            rx_err <= 1'b1;
          end
        end
        default: rx_st_q <= RX_IDLE;
      endcase
    end
  end

endmodule
