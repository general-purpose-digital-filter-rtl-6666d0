// spi_master -- SPI bus master for the converter links.
//
// One transaction moves D_WIDTH bits each way, most significant bit first.
// A pulse (or level) on enable while the master is idle loads tx_data into the
// transmit buffer, selects slave addr (slave 0 if addr is out of range) and
// starts the transfer. The serial clock toggles every clk_div board-clock
// cycles (clk_div = 0 is treated as 1), so with clk_div = 1 and a 100 MHz board
// clock the bus runs at 50 MHz. cpol sets the idle level of sclk; cpha = 0
// samples MISO on the leading sclk edge and changes MOSI on the trailing edge,
// cpha = 1 does the opposite. When the last bit has been received the master
// releases the slave select, copies the receive buffer to rx_data and drops
// busy. The transmit buffer and the rx_data register are the two buffering
// registers of each link.
//
// Continuous mode: if cont is high at the last sclk edge of a word, the
// master keeps the slave selected and the clock running, reloads the
// transmit buffer from tx_data, and signals the finished word by loading
// rx_data and dropping busy for one clock cycle. Give the next word on tx_data
// while the current one is being sent, and drop cont during the last word.
//
// This follows the behaviour of the general-purpose SPI master the platform
// uses (selectable polarity, phase, clock ratio, slave address, continuous
// mode, busy flag). The platform ties cont low. MOSI is driven low while idle
// instead of being released; that choice and the exact cycle of the busy
// pulse are this design's own.
//
// Timing: slave select and busy go active on the clock edge that sees enable;
// the first sclk edge follows clk_div cycles later, and busy falls with
// rx_data valid (2*D_WIDTH+1)*clk_div + 1 cycles after that edge. With the
// platform's 32-bit ADC frame and clk_div = 1 that is 66 cycles, within one
// 100-cycle sample period. Reset is asynchronous, active low.
module spi_master #(
  parameter int SLAVES  = 1,
  parameter int D_WIDTH = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic               cpol,
  input  logic               cpha,
  input  logic               cont,
  input  logic [15:0]        clk_div,
  input  logic [31:0]        addr,
  input  logic [D_WIDTH-1:0] tx_data,
  input  logic               miso,
  output logic               sclk,
  output logic [SLAVES-1:0]  ss_n,
  output logic               mosi,
  output logic               busy,
  output logic [D_WIDTH-1:0] rx_data
);

  localparam int SW = (SLAVES > 1) ? $clog2(SLAVES) : 1;
  localparam int EW = $clog2(2 * D_WIDTH + 2);

  typedef enum logic {READY, EXECUTE} spi_state_t;

  spi_state_t         state;
  logic [SW-1:0]      slave;
  logic [15:0]        ratio;
  logic [15:0]        count;
  logic [EW-1:0]      edges;      // sclk edges produced so far
  logic               phase;      // latched cpha
  logic [D_WIDTH-1:0] tx_buf;
  logic [D_WIDTH-1:0] rx_buf;
  logic [SW-1:0]      sel;

  assign sel = (addr < 32'(SLAVES)) ? SW'(addr) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= READY;
      slave   <= '0;
      ratio   <= 16'd1;
      count   <= 16'd1;
      edges   <= '0;
      phase   <= 1'b0;
      tx_buf  <= '0;
      rx_buf  <= '0;
      sclk    <= 1'b0;
      ss_n    <= '1;
      mosi    <= 1'b0;
      busy    <= 1'b1;
      rx_data <= '0;
    end else begin
      unique case (state)
        READY: begin
          busy <= 1'b0;
          ss_n <= '1;
          mosi <= 1'b0;
          sclk <= cpol;
          if (enable) begin
            busy  <= 1'b1;
            slave <= sel;
            ss_n[sel] <= 1'b0;      // select one cycle ahead of the first edge
            ratio <= (clk_div == 16'd0) ? 16'd1 : clk_div;
            count <= 16'd1;
            edges <= '0;
            phase <= cpha;
            if (!cpha) begin
              // first bit must be on MOSI before the first (sampling) edge
              mosi   <= tx_data[D_WIDTH-1];
              tx_buf <= tx_data << 1;
            end else begin
              tx_buf <= tx_data;
            end
            state <= EXECUTE;
          end
        end

        EXECUTE: begin
          busy        <= 1'b1;
          ss_n[slave] <= 1'b0;
          if (count == ratio) begin
            count <= 16'd1;
            if (edges == EW'(2 * D_WIDTH)) begin
              // one extra half period after the last edge, then end
              busy    <= 1'b0;
              ss_n    <= '1;
              mosi    <= 1'b0;
              rx_data <= rx_buf;
              state   <= READY;
            end else begin
              edges <= edges + 1'b1;
              sclk  <= ~sclk;
              if (edges == EW'(2 * D_WIDTH - 1) && cont) begin
                // last edge of a word in continuous mode: hand the word over
                // with a one-cycle drop of busy, reload tx_data and go on
                // clocking without a gap or a deselect
                edges <= '0;
                busy  <= 1'b0;
                if (phase) begin
                  rx_data <= {rx_buf[D_WIDTH-2:0], miso};
                  tx_buf  <= tx_data;
                end else begin
                  rx_data <= rx_buf;
                  mosi    <= tx_data[D_WIDTH-1];
                  tx_buf  <= tx_data << 1;
                end
              end else if (edges[0] == phase) begin
                // sampling edge
                rx_buf <= {rx_buf[D_WIDTH-2:0], miso};
              end else if (!(phase == 1'b0 && edges == EW'(2 * D_WIDTH - 1))) begin
                // launching edge (none after the last bit in mode cpha = 0)
                mosi   <= tx_buf[D_WIDTH-1];
                tx_buf <= tx_buf << 1;
              end
            end
          end else begin
            count <= count + 1'b1;
          end
        end

        default: state <= READY;
      endcase
    end
  end

endmodule
