// tb_font_rom: checks glyphs of the characters used by the system's demo
// texts ("HELLO", "TEST") and all digits row by row against pictures drawn
// here, that lower case maps to upper case, and that space and control
// codes are blank.
module tb_font_rom;
  logic [6:0] code;
  logic [2:0] row;
  logic [7:0] bits;
  int checks = 0, failures = 0;

  font_rom dut (.code(code), .row(row), .bits(bits));

  typedef string pic_t [7];

  function automatic pic_t pic(byte ch);
    case (ch)
      "H": return '{"#   #","#   #","#   #","#####","#   #","#   #","#   #"};
      "E": return '{"#####","#    ","#    ","#### ","#    ","#    ","#####"};
      "L": return '{"#    ","#    ","#    ","#    ","#    ","#    ","#####"};
      "O": return '{" ### ","#   #","#   #","#   #","#   #","#   #"," ### "};
      "T": return '{"#####","  #  ","  #  ","  #  ","  #  ","  #  ","  #  "};
      "S": return '{" ####","#    ","#    "," ### ","    #","    #","#### "};
      "0": return '{" ### ","#   #","#  ##","# # #","##  #","#   #"," ### "};
      "1": return '{"  #  "," ##  ","  #  ","  #  ","  #  ","  #  "," ### "};
      "2": return '{" ### ","#   #","    #","   # ","  #  "," #   ","#####"};
      "3": return '{"#####","   # ","  #  ","   # ","    #","#   #"," ### "};
      "4": return '{"   # ","  ## "," # # ","#  # ","#####","   # ","   # "};
      "5": return '{"#####","#    ","#### ","    #","    #","#   #"," ### "};
      "6": return '{"  ## "," #   ","#    ","#### ","#   #","#   #"," ### "};
      "7": return '{"#####","    #","   # ","  #  "," #   "," #   "," #   "};
      "8": return '{" ### ","#   #","#   #"," ### ","#   #","#   #"," ### "};
      "9": return '{" ### ","#   #","#   #"," ####","    #","   # "," ##  "};
      default: return '{"     ","     ","     ","     ","     ","     ","     "};
    endcase
  endfunction

  task automatic check_char(byte ch, byte as_code);
    pic_t p = pic(ch);
    for (int r = 0; r < 8; r++) begin
      logic [7:0] exp = '0;
      if (r < 7) for (int c = 0; c < 5; c++) if (p[r][c] == "#") exp[6 - c] = 1'b1;
      code = 7'(as_code);
      row = 3'(r);
      #1;
      checks++;
      if (bits != exp) begin
        failures++; $display("FAIL char %c row %0d: %b expected %b", as_code, r, bits, exp);
      end
    end
  endtask

  initial begin
    string s = "HELOTS0123456789";
    foreach (s[i]) check_char(s[i], s[i]);
    check_char("H", "h");
    check_char("O", "o");
    check_char(" ", " ");
    check_char(" ", 8'h0A);
    check_char(" ", 8'h7F);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
