// dac_spi: serial interface to the board's digital-to-analog converter.
//
// Each start sends one sample to the DAC as a 24-bit SPI word, MSB first:
//   [23:20] command  (CMD,  default 4'b0011: write and update)
//   [19:16] address  (ADDR, default 4'b1111: all channels)
//   [15:4]  12-bit code = {sample, 4'b0000}
//   [3:0]   don't care (zero)
// The DAC samples MOSI on the rising edge of SCK; SCK runs at half the system
// clock. Chip select returns high after the 24th bit, which makes the DAC
// update its output. The state machine (idle, send data, latch), the bit
// counter and the 24-bit data register correspond to the DAC state, counter
// and data signals of the original design; the word layout is that of the
// serial quad 12-bit DAC on the Spartan-3E starter board, chosen here because
// the original design gives none. dac_clr_n is held low only during reset.
//
// Timing: start is taken in IDLE only (busy low); dac_cs_n falls the next
// cycle, the word takes 2*24 cycles, and done pulses when dac_cs_n rises, 50
// cycles after start.
module dac_spi #(
  parameter int unsigned SAMPLE_W = 8,
  parameter logic [3:0]  CMD      = 4'b0011,
  parameter logic [3:0]  ADDR     = 4'b1111
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [SAMPLE_W-1:0] sample,
  output logic                busy,
  output logic                done,
  output logic                spi_sck,
  output logic                spi_mosi,
  output logic                dac_cs_n,
  output logic                dac_clr_n
);

  localparam int unsigned WORD_W = 24;

  typedef enum logic [1:0] {ST_IDLE, ST_SENDDAT, ST_LATCH} dac_state_t;

  dac_state_t        dacstate;
  logic [4:0]        daccounter;   // bits still to send after the current one
  logic [WORD_W-1:0] dacdata;
  logic [11:0]       code;

  always_comb begin
    code = 12'(sample) << (12 - SAMPLE_W);
    busy = (dacstate != ST_IDLE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dacstate   <= ST_IDLE;
      daccounter <= '0;
      dacdata    <= '0;
      spi_sck    <= 1'b0;
      spi_mosi   <= 1'b0;
      dac_cs_n   <= 1'b1;
      dac_clr_n  <= 1'b0;
      done       <= 1'b0;
    end else begin
      dac_clr_n <= 1'b1;
      done      <= 1'b0;
      unique case (dacstate)
        ST_IDLE: begin
          spi_sck <= 1'b0;
          if (start) begin
            dacdata    <= {CMD, ADDR, code, 4'b0000} << 1;
            spi_mosi   <= CMD[3];
            daccounter <= 5'(WORD_W - 1);
            dac_cs_n   <= 1'b0;
            dacstate   <= ST_SENDDAT;
          end
        end
        ST_SENDDAT: begin
          if (!spi_sck) begin
            spi_sck <= 1'b1;
          end else begin
            spi_sck <= 1'b0;
            if (daccounter == '0) begin
              dacstate <= ST_LATCH;
            end else begin
              spi_mosi   <= dacdata[WORD_W-1];
              dacdata    <= dacdata << 1;
              daccounter <= daccounter - 1'b1;
            end
          end
        end
        ST_LATCH: begin
          dac_cs_n <= 1'b1;
          done     <= 1'b1;
          dacstate <= ST_IDLE;
        end
        default: dacstate <= ST_IDLE;
      endcase
    end
  end

  // SCK only toggles while the DAC is selected.
  a_sck_idle: assert property (@(posedge clk) disable iff (!rst_n) dac_cs_n |-> !spi_sck)
    else $error("dac_spi: SCK high with chip select inactive");

endmodule
