// braille_ref_pkg: reference data for the keyboard testbenches - the dot
// numbers of the 64 North American Computer Braille characters 0x20..0x5F,
// written as digit strings, and a function giving a character's 6-bit dot
// pattern (bit 0 = dot 1).
package braille_ref_pkg;
  localparam string DOTS [64] = '{
    "",      "2346",  "5",     "3456",  "1246",  "146",   "12346", "3",
    "12356", "23456", "16",    "346",   "6",     "36",    "46",    "34",
    "356",   "2",     "23",    "25",    "256",   "26",    "235",   "2356",
    "236",   "35",    "156",   "56",    "126",   "123456","345",   "1456",
    "4",     "1",     "12",    "14",    "145",   "15",    "124",   "1245",
    "125",   "24",    "245",   "13",    "123",   "134",   "1345",  "135",
    "1234",  "12345", "1235",  "234",   "2345",  "136",   "1236",  "2456",
    "1346",  "13456", "1356",  "246",   "1256",  "12456", "45",    "456"};

  function automatic logic [5:0] dots_of(byte unsigned ch);
    string s = DOTS[ch - 8'h20];
    logic [5:0] d = '0;
    for (int i = 0; i < s.len(); i++) d[s[i] - "1"] = 1'b1;
    return d;
  endfunction
endpackage
