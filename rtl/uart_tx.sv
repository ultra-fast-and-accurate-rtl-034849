// uart_tx: sends each run's results to the host over an RS232C line.
//
// When load is high (one cycle, with res_valid of the run controller) the
// record is latched and sent as 16 bytes, each as a standard 8N1 frame (start
// bit 0, eight data bits LSB first, stop bit 1) with CLKS_PER_BIT clock
// cycles per bit; 200 at 100 MHz gives the 0.5 Mbit/s line rate. The line
// idles high. The record is: 0xA5 (frame marker), rate index, then the packet
// count (4 bytes), the total latency (6 bytes) and the emulated network
// cycles (4 bytes, upper 4 bits zero), each least significant byte first.
// busy is high from load until the last stop bit has been sent; a load while
// busy is ignored, so the run controller waits for busy to fall.
//
// The line rate and the three reported quantities follow the document; the
// record layout, the frame marker and the byte order are this design's.
//
// Lint note: frame[0] holds the start bit, which is put on txd directly when
// the frame is loaded, so that bit is never read.
module uart_tx #(
  parameter int CLKS_PER_BIT = 200                   // 100 MHz / 0.5 Mbit/s
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     load,
  input  logic [7:0]               rate,
  input  logic [31:0]              packets,
  input  logic [47:0]              latency,
  input  logic [noc_pkg::TS_W-1:0] cycles,
  output logic                     txd,
  output logic                     busy
);
  localparam int NBYTES = 16;
  localparam int CW     = $clog2(CLKS_PER_BIT > 1 ? CLKS_PER_BIT : 2);

  logic [NBYTES*8-1:0] rec;      // remaining bytes, next one in the low byte
  logic [4:0]          nbytes;   // bytes still to send, including the current one
  logic [9:0]          frame;    // current frame, next bit in bit 0
  logic [3:0]          nbits;    // bits of the frame still to send
  logic [CW-1:0]       clk_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      txd     <= 1'b1;
      nbytes  <= '0;
      nbits   <= '0;
      clk_cnt <= '0;
      rec     <= '0;
      frame   <= '1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (load) begin
        busy    <= 1'b1;
        rec     <= {32'(cycles), latency, packets, rate, 8'hA5};
        nbytes  <= 5'(NBYTES);
        nbits   <= '0;
        clk_cnt <= '0;
      end
    end else if (nbits == '0) begin
      // start the next frame, or finish
      if (nbytes == '0) begin
        busy <= 1'b0;
      end else begin
        frame   <= {1'b1, rec[7:0], 1'b0};
        rec     <= rec >> 8;
        nbytes  <= nbytes - 1'b1;
        nbits   <= 4'd10;
        clk_cnt <= '0;
        txd     <= 1'b0;                 // start bit goes out now
      end
    end else if (int'(clk_cnt) == CLKS_PER_BIT - 1) begin
      clk_cnt <= '0;
      frame   <= {1'b1, frame[9:1]};
      nbits   <= nbits - 1'b1;
      txd     <= (nbits == 4'd1) ? 1'b1 : frame[1];
    end else begin
      clk_cnt <= clk_cnt + 1'b1;
    end
  end
endmodule
