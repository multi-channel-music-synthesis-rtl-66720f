// Count Map: translates a song entry into the chip's 8-bit count word.
//
// A song entry is six bits: a 5-bit note code (0 = C4 up to 24 = C6, one
// code per semitone, 31 = rest) and the endnote bit. The map returns the
// count word N for the note with the endnote bit copied into its LSB, so
// the chip gets both through its eight input pins. The chip's counter
// counts from N up to 256, so a note's tone period is (256 - N) x 20 us;
// an endnote bit of 1 shortens it by 20 us, an error the design accepts.
// The rest code gives 20 hex whatever the endnote bit. The 25 note words
// and the rest word are the original table. Codes 25 to 30 are not
// assigned there; this design maps them to the rest word, so that they
// are silent.
//
// Combinational ROM, 64 x 8: word_o follows addr_i = {code, endnote}.
module count_map (
  input  logic [5:0] addr_i,   // {note code[4:0], endnote}
  output logic [7:0] word_o
);

  logic [4:0] code;
  logic       endnote;
  logic [7:0] base;

  assign code    = addr_i[5:1];
  assign endnote = addr_i[0];

  always_comb begin
    unique case (code)
      5'd0:    base = 8'h40;  // C4
      5'd1:    base = 8'h4A;  // C#4
      5'd2:    base = 8'h54;  // D4
      5'd3:    base = 8'h5E;  // D#4
      5'd4:    base = 8'h66;  // E4
      5'd5:    base = 8'h70;  // F4
      5'd6:    base = 8'h78;  // F#4
      5'd7:    base = 8'h7E;  // G4
      5'd8:    base = 8'h86;  // G#4
      5'd9:    base = 8'h8C;  // A4
      5'd10:   base = 8'h94;  // A#4
      5'd11:   base = 8'h9A;  // B4
      5'd12:   base = 8'h9E;  // C5
      5'd13:   base = 8'hA4;  // C#5
      5'd14:   base = 8'hAA;  // D5
      5'd15:   base = 8'hAE;  // D#5
      5'd16:   base = 8'hB2;  // E5
      5'd17:   base = 8'hB6;  // F5
      5'd18:   base = 8'hBA;  // F#5
      5'd19:   base = 8'hBE;  // G5
      5'd20:   base = 8'hC2;  // G#5
      5'd21:   base = 8'hC6;  // A5
      5'd22:   base = 8'hC8;  // A#5
      5'd23:   base = 8'hCC;  // B5
      5'd24:   base = 8'hCE;  // C6
      default: base = 8'h20;  // rest (31) and unassigned codes
    endcase
  end

  // A rest word carries no endnote bit.
  assign word_o = (base == 8'h20) ? base : (base | {7'd0, endnote});

endmodule
