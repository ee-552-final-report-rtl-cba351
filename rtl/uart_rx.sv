// uart_rx: asynchronous serial receiver (RS-232 framing, 8 data bits, no
// parity, one stop bit, least significant bit first).
//
// The line is synchronised with two flip-flops. A falling edge on the idle
// line starts a frame; the start bit is re-checked half a bit later, then
// each data bit and the stop bit are sampled in the middle of their bit
// time, CLKS_PER_BIT system clocks apart. A byte with a valid stop bit is
// presented on data with a one-cycle valid pulse at the middle of the stop
// bit; a frame with a low stop bit raises frame_err for one cycle instead.
//
// The 9600 baud rate and the 25.175 MHz system clock follow the design
// description; the sampling scheme is this design's own.
module uart_rx #(
  parameter int unsigned CLK_HZ = 25_175_000,
  parameter int unsigned BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  localparam int unsigned CLKS_PER_BIT = (CLK_HZ + BAUD / 2) / BAUD;
  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;
  state_t state;

  logic [1:0]    sync;
  logic [CW-1:0] count;
  logic [2:0]    bitn;
  logic [7:0]    shreg;

  wire line = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sync      <= 2'b11;
      state     <= IDLE;
      count     <= '0;
      bitn      <= '0;
      shreg     <= '0;
      data      <= '0;
      valid     <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        IDLE: begin
          count <= '0;
          if (!line) state <= START;
        end
        START: begin
          if (count == CW'(CLKS_PER_BIT / 2 - 1)) begin
            count <= '0;
            bitn  <= '0;
            state <= line ? IDLE : DATA;   // glitch: back to idle
          end else begin
            count <= count + 1'b1;
          end
        end
        DATA: begin
          if (count == CW'(CLKS_PER_BIT - 1)) begin
            count <= '0;
            shreg <= {line, shreg[7:1]};
            bitn  <= bitn + 1'b1;
            if (bitn == 3'd7) state <= STOP;
          end else begin
            count <= count + 1'b1;
          end
        end
        STOP: begin
          if (count == CW'(CLKS_PER_BIT - 1)) begin
            count <= '0;
            state <= IDLE;
            if (line) begin
              data  <= shreg;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            count <= count + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
