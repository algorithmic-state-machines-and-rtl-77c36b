// ps2_keyboard - PS/2 keyboard receiver.
//
// The keyboard sends each scan-code byte as an 11-bit frame on its own clock:
// a start bit (0), eight data bits LSB first, an odd-parity bit and a stop
// bit (1); the receiver samples data on each falling edge of keyboard_clk.
// Both keyboard lines are first passed through two flip-flops to bring them
// into the system clock domain, then a falling edge of the synchronised clock
// shifts one bit in. After the eleventh bit the frame is checked (start, stop
// and parity) and, if good, the byte is kept in scan_code and scan_ready
// pulses high for one clock. A frame that stops half way (no keyboard clock
// edge for TIMEOUT system clocks) is dropped, so the receiver falls back into
// step with the keyboard.
//
// Interface: clk is the system clock (25 MHz), rst_n an active-low
// synchronous reset. scan_code holds the last good byte until the next one
// arrives; a byte is available two clocks (synchroniser) plus one clock after
// the falling keyboard clock edge that delivered its stop bit.
//
// The published design uses a keyboard receiver from its earlier lab work and
// gives only its pins; this implementation, the frame check and the timeout
// are this design's own.
module ps2_keyboard #(
  parameter int unsigned TIMEOUT = 12500  // 500 us at 25 MHz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       keyboard_clk,
  input  logic       keyboard_data,
  output logic [7:0] scan_code,
  output logic       scan_ready
);

  logic [2:0]  kclk_sync;       // two synchroniser stages + one for edge detection
  logic [1:0]  kdat_sync;
  logic [10:0] shift;           // bit 10 is the newest bit
  logic [3:0]  bit_cnt;
  logic [$clog2(TIMEOUT+1)-1:0] idle_cnt;

  wire kclk_fall = kclk_sync[2] && !kclk_sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      kclk_sync  <= '1;
      kdat_sync  <= '1;
      shift      <= '0;
      bit_cnt    <= '0;
      idle_cnt   <= '0;
      scan_code  <= '0;
      scan_ready <= 1'b0;
    end else begin
      kclk_sync  <= {kclk_sync[1:0], keyboard_clk};
      kdat_sync  <= {kdat_sync[0], keyboard_data};
      scan_ready <= 1'b0;

      if (kclk_fall) begin
        idle_cnt <= '0;
        shift    <= {kdat_sync[1], shift[10:1]};
        if (bit_cnt == 4'd10) begin
          bit_cnt <= '0;
          // shift[1] is the start bit, shift[9:2] the data, shift[10] the parity
          // once the stop bit (kdat_sync[1]) is taken into account.
          if (!shift[1] && kdat_sync[1] && (^{shift[10:2]})) begin
            scan_code  <= shift[9:2];
            scan_ready <= 1'b1;
          end
        end else begin
          bit_cnt <= bit_cnt + 4'd1;
        end
      end else if (bit_cnt != '0) begin
        if (idle_cnt == ($clog2(TIMEOUT+1))'(TIMEOUT)) begin
          bit_cnt  <= '0;
          idle_cnt <= '0;
        end else begin
          idle_cnt <= idle_cnt + 1'b1;
        end
      end
    end
  end

endmodule
