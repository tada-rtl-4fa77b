// spi_slave: byte-oriented SPI target (mode 0) used by the interconnect to
// exchange messages with the attached MCUs.
//
// SCLK, MOSI and CS_n come from the MCU asynchronously. They pass through
// two-flop synchronisers and are sampled with the system clock, so the system
// clock must run at least 8 times faster than SCLK (each SCLK half period must
// span 4 or more system clocks). Mode 0: MOSI is captured on the rising SCLK
// edge, MISO changes after the falling edge, most significant bit first.
//
// Receive: after every eighth rising edge rx_valid pulses for one cycle with
// the byte in rx_data.
// Transmit: a one-byte holding register (tx_data/tx_wr, tx_empty) feeds the
// shift register. The holding register is copied into the shift register when
// CS_n falls and after the falling edge that closes each byte; if it is empty
// then, 0x00 is sent. Whoever answers has from rx_valid of one byte until the
// next falling SCLK edge (at least 4 system clocks) to place the byte that
// follows, and a whole byte time for the bytes after that.
// cs_start/cs_end pulse when a transaction opens and closes; cs_active is
// high in between.
// The choice of SPI mode, bit order and synchronous oversampling is this
// design's own; the document only says that the MCUs reach the interconnect
// over SPI.
module spi_slave (
  input  logic       clk,
  input  logic       rst_n,
  // SPI pins (asynchronous to clk)
  input  logic       sclk,
  input  logic       cs_n,
  input  logic       mosi,
  output logic       miso,
  // byte interface
  output logic       cs_active,
  output logic       cs_start,
  output logic       cs_end,
  output logic       rx_valid,
  output logic [7:0] rx_data,
  input  logic       tx_wr,
  input  logic [7:0] tx_data,
  output logic       tx_empty
);

  logic [2:0] sclk_q, cs_q;
  logic [1:0] mosi_q;
  logic [2:0] bit_cnt;
  logic [6:0] rx_sh;
  logic [7:0] tx_sh, hold;
  logic       hold_v;

  wire sclk_rise = sclk_q[1] & ~sclk_q[2];
  wire sclk_fall = ~sclk_q[1] & sclk_q[2];
  wire cs_fall   = ~cs_q[1] & cs_q[2];
  wire cs_rise   = cs_q[1] & ~cs_q[2];
  wire active    = ~cs_q[1];
  wire load      = cs_fall | (active & sclk_fall & (bit_cnt == 3'd0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_q <= '0;
      cs_q   <= '1;
      mosi_q <= '0;
    end else begin
      sclk_q <= {sclk_q[1:0], sclk};
      cs_q   <= {cs_q[1:0], cs_n};
      mosi_q <= {mosi_q[0], mosi};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_cnt  <= '0;
      rx_sh    <= '0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
      tx_sh    <= '0;
      hold     <= '0;
      hold_v   <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      if (!active) begin
        bit_cnt <= '0;
      end else if (sclk_rise) begin
        rx_sh   <= {rx_sh[5:0], mosi_q[1]};
        bit_cnt <= bit_cnt + 3'd1;
        if (bit_cnt == 3'd7) begin
          rx_valid <= 1'b1;
          rx_data  <= {rx_sh, mosi_q[1]};
        end
      end
      if (load) begin
        tx_sh <= hold_v ? hold : 8'h00;
      end else if (active && sclk_fall) begin
        tx_sh <= {tx_sh[6:0], 1'b0};
      end
      // holding register: a write in the same cycle as a load refills it
      // after the load has taken the old value
      if (cs_rise) begin
        hold_v <= 1'b0;
      end else if (tx_wr) begin
        hold   <= tx_data;
        hold_v <= 1'b1;
      end else if (load) begin
        hold_v <= 1'b0;
      end
    end
  end

  assign miso      = tx_sh[7];
  assign cs_active = active;
  assign cs_start  = cs_fall;
  assign cs_end    = cs_rise;
  assign tx_empty  = ~hold_v;

endmodule
