// arrow_decoder - turns PS/2 scan-code bytes into arrow-key move commands.
//
// Watches the byte stream from the keyboard receiver. After a break prefix
// (F0), the next byte is examined: 75, 72, 6B or 74 (up, down, left, right)
// give a one-clock pulse on move with the direction on dir; any other byte
// is ignored. As in the cursor state machine, only the last two bytes of
// the three-byte release sequence E0 F0 xx are looked at, so the key acts
// when it is released.
//
// Interface: clk, rst_n (active-low synchronous reset); scan_code and
// scan_ready from ps2_keyboard. move pulses in the clock after the
// scan_ready pulse of the final byte; dir holds the last direction.
//
// Recognising the key on the byte strobe rather than on the held byte value
// is this design's own choice; the key codes are the published ones.
module arrow_decoder
  import vga_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] scan_code,
  input  logic       scan_ready,
  output logic       move,
  output dir_t       dir
);

  logic after_break;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      after_break <= 1'b0;
      move        <= 1'b0;
      dir         <= DIR_UP;
    end else begin
      move <= 1'b0;
      if (scan_ready) begin
        if (scan_code == KEY_BREAK) begin
          after_break <= 1'b1;
        end else begin
          after_break <= 1'b0;
          if (after_break) begin
            unique case (scan_code)
              KEY_UP:    begin dir <= DIR_UP;    move <= 1'b1; end
              KEY_DOWN:  begin dir <= DIR_DOWN;  move <= 1'b1; end
              KEY_LEFT:  begin dir <= DIR_LEFT;  move <= 1'b1; end
              KEY_RIGHT: begin dir <= DIR_RIGHT; move <= 1'b1; end
              default: ;
            endcase
          end
        end
      end
    end
  end

endmodule
