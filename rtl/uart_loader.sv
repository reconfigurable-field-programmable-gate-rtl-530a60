// uart_loader: serial loader of the executable image into the
// instruction memory.
//
// In the source description the program image is sent from a PC over a
// UART into the instruction unit before a run. This block receives 8-bit
// characters in the usual asynchronous format (one start bit, eight data
// bits LSB first, one stop bit, no parity), packs every four characters
// into a 32-bit instruction word, least significant byte first, and writes
// the words to consecutive instruction-memory addresses starting at 0.
// Frame format, byte order and bit rate are this design's choices; the
// description names only the UART. The default of 1302 clocks per bit is
// 115200 bit/s at the 150 MHz clock reported for the implementation.
//
// Receiver: the line is synchronised by two flip-flops; a falling edge
// starts a character, every bit is sampled in the middle of its period,
// and a character whose stop bit is low is dropped and flagged.
//
// Interface: rxd is the serial line (idle high). clear restarts the word
// address at 0. prog_we/prog_addr/prog_data write one word in one cycle.
// words counts the words written since clear; frame_err is sticky until
// clear.
module uart_loader #(
  parameter int unsigned CLKS_PER_BIT = 1302,
  parameter int unsigned AW           = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rxd,
  input  logic          clear,
  output logic          prog_we,
  output logic [AW-1:0] prog_addr,
  output logic [31:0]   prog_data,
  output logic [AW:0]   words,
  output logic          frame_err
);

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;

  localparam int unsigned CW = $clog2(CLKS_PER_BIT + 1);

  logic [1:0]    sync;
  logic          rx;
  rx_state_e     st;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    shreg;
  logic          byte_ok;
  logic [1:0]    nbyte;
  logic [23:0]   part;

  assign rx = sync[1];

  // receiver
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync    <= 2'b11;
      st      <= RX_IDLE;
      cnt     <= '0;
      bitn    <= '0;
      shreg   <= '0;
      byte_ok <= 1'b0;
    end else begin
      sync    <= {sync[0], rxd};
      byte_ok <= 1'b0;
      unique case (st)
        RX_IDLE: if (!rx) begin st <= RX_START; cnt <= '0; end
        RX_START: begin
          if (cnt == CW'(CLKS_PER_BIT / 2 - 1)) begin
            cnt <= '0;
            if (!rx) begin st <= RX_DATA; bitn <= '0; end
            else st <= RX_IDLE;                 // glitch, not a start bit
          end else cnt <= cnt + 1'b1;
        end
        RX_DATA: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt   <= '0;
            shreg <= {rx, shreg[7:1]};
            bitn  <= bitn + 1'b1;
            if (bitn == 3'd7) st <= RX_STOP;
          end else cnt <= cnt + 1'b1;
        end
        RX_STOP: begin
          if (cnt == CW'(CLKS_PER_BIT - 1)) begin
            cnt     <= '0;
            st      <= RX_IDLE;
            byte_ok <= rx;
          end else cnt <= cnt + 1'b1;
        end
        default: st <= RX_IDLE;
      endcase
    end
  end

  // word assembly and memory write
  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      nbyte     <= '0;
      part      <= '0;
      prog_we   <= 1'b0;
      prog_addr <= '0;
      prog_data <= '0;
      words     <= '0;
      frame_err <= 1'b0;
    end else begin
      if (prog_we) prog_addr <= prog_addr + 1'b1;
      prog_we <= 1'b0;
      if (st == RX_STOP && cnt == CW'(CLKS_PER_BIT - 1) && !rx) frame_err <= 1'b1;
      if (byte_ok) begin
        nbyte <= nbyte + 1'b1;
        if (nbyte == 2'd3) begin
          prog_we   <= 1'b1;
          prog_data <= {shreg, part};
          words     <= words + 1'b1;
        end else
          part <= {shreg, part[23:8]};
      end
    end
  end

endmodule
