// aed_pkg -- shared types and constant tables of the partitioned functional
// unit with an SOP (sum-of-products) checker.
//
// The example design is a 5-input, 5-output combinational unit that can only
// ever produce six output words Y1..Y6. Its outputs are split into two
// independent sub-circuits, c1 = (y4,y3,y2) and c2 = (y1,y0). Because two
// words that agree on one half (distance one) could be confused by a fault in
// the other half, the checker also looks at the primary inputs X: for every
// word Yj it evaluates a "characteristic function" gj(X) that is 1 where the
// unit legally produces Yj and 0 wherever it produces a word at distance one
// from Yj.
//
// Everything here is a cube table. A cube is a product term over X, stored as
// a care mask and a value: the product is 1 when (x & care) == val.
//   * FU_CUBES        - where the unit produces each word (the unit's function).
//                       Word Y5 has no list: it covers every other input.
//   * CHAR_MIN_LIT    - characteristic functions with the fewest literals
//                       (the design's main checker, 16 literals in 9 cubes).
//   * CHAR_MIN_IN     - characteristic functions that read only x3, x2, x0
//                       (the alternative with the fewest checker inputs).
// The words, the partition c1/c2, the function cubes and both sets of
// characteristic cubes follow the document's worked example exactly. The
// split of the six words between the two checker rails (PI1_MASK) is not
// given there and is this design's own choice.
package aed_pkg;

  localparam int unsigned M_IN   = 5;  // m: primary inputs x4..x0
  localparam int unsigned K_OUT  = 5;  // k: outputs y4..y0
  localparam int unsigned K1     = 3;  // bits in sub-circuit c1 = (y4,y3,y2)
  localparam int unsigned K2     = 2;  // bits in sub-circuit c2 = (y1,y0)
  localparam int unsigned NWORDS = 6;  // M: distinct output words
  localparam int unsigned MAXC   = 8;  // longest cube list in any table

  typedef logic [M_IN-1:0]  x_t;
  typedef logic [K_OUT-1:0] y_t;
  typedef logic [K1-1:0]    c1_t;
  typedef logic [K2-1:0]    c2_t;

  // A product term over X: active when (x & care) == val.
  typedef struct packed {
    logic [M_IN-1:0] care;
    logic [M_IN-1:0] val;
  } cube_t;

  typedef cube_t cube_list_t [MAXC];

  // Which set of characteristic functions the checker uses.
  typedef enum logic {
    CHAR_MIN_LITERALS = 1'b0,
    CHAR_MIN_INPUTS   = 1'b1
  } char_set_e;

  // Output words Y1..Y6, index j-1 holds Yj = (y4 y3 y2 y1 y0).
  localparam y_t WORDS [NWORDS] = '{
    5'b01011,  // Y1
    5'b00001,  // Y2
    5'b00101,  // Y3
    5'b10111,  // Y4
    5'b11010,  // Y5
    5'b11111   // Y6
  };

  // Index of the word produced wherever no listed cube matches (Y5).
  localparam int unsigned DEFAULT_WORD = 4;

  // Checker rail assignment: bit j-1 set means Yj belongs to rail R1,
  // clear means rail R0. Y1..Y3 -> R0, Y4..Y6 -> R1.
  localparam logic [NWORDS-1:0] PI1_MASK = 6'b111000;

  // Build a cube from a pattern written most significant input first with
  // characters '0', '1' and '*', e.g. "*01*0".
  function automatic cube_t mk(input string s);
    cube_t c;
    c = '0;
    for (int i = 0; i < M_IN; i++) begin
      case (s[i])
        "1": begin c.care[M_IN-1-i] = 1'b1; c.val[M_IN-1-i] = 1'b1; end
        "0": begin c.care[M_IN-1-i] = 1'b1; c.val[M_IN-1-i] = 1'b0; end
        default: ;
      endcase
    end
    return c;
  endfunction

  // Number of cubes used in each list (the rest of the MAXC slots are unused).
  localparam int unsigned FU_NCUBES [NWORDS]  = '{2, 3, 1, 1, 0, 3};
  localparam int unsigned MINLIT_NC [NWORDS]  = '{2, 1, 1, 1, 1, 3};
  localparam int unsigned MININ_NC  [NWORDS]  = '{2, 3, 1, 1, 6, 3};

  // Where the unit produces each word. Y5 takes all remaining inputs.
  localparam cube_list_t FU_CUBES [NWORDS] = '{
    '{mk("001*0"), mk("1*001"), '0, '0, '0, '0, '0, '0},             // Y1
    '{mk("10000"), mk("00*11"), mk("10110"), '0, '0, '0, '0, '0},    // Y2
    '{mk("11*00"), '0, '0, '0, '0, '0, '0, '0},                      // Y3
    '{mk("00000"), '0, '0, '0, '0, '0, '0, '0},                      // Y4
    '{'0, '0, '0, '0, '0, '0, '0, '0},                               // Y5
    '{mk("1111*"), mk("01000"), mk("0*101"), '0, '0, '0, '0, '0}     // Y6
  };

  // Characteristic functions with the fewest literals.
  localparam cube_list_t CHAR_MIN_LIT [NWORDS] = '{
    '{mk("*01*0"), mk("**0*1"), '0, '0, '0, '0, '0, '0},             // g1
    '{mk("*0***"), '0, '0, '0, '0, '0, '0, '0},                      // g2
    '{mk("*1***"), '0, '0, '0, '0, '0, '0, '0},                      // g3
    '{mk("*00*0"), '0, '0, '0, '0, '0, '0, '0},                      // g4
    '{mk("*****"), '0, '0, '0, '0, '0, '0, '0},                      // g5 = 1
    '{mk("*1*1*"), mk("*1**0"), mk("**1*1"), '0, '0, '0, '0, '0}     // g6
  };

  // Characteristic functions over the input subset {x3, x2, x0} only.
  localparam cube_list_t CHAR_MIN_IN [NWORDS] = '{
    '{mk("*01*0"), mk("**0*1"), '0, '0, '0, '0, '0, '0},             // g1
    '{mk("*00*0"), mk("*0**1"), mk("*01*0"), '0, '0, '0, '0, '0},    // g2
    '{mk("*1**0"), '0, '0, '0, '0, '0, '0, '0},                      // g3
    '{mk("*00*0"), '0, '0, '0, '0, '0, '0, '0},                      // g4
    '{mk("**0*1"), mk("*01**"), mk("**1*1"), mk("*0**1"),
      mk("**0*0"), mk("*1***"), '0, '0},                             // g5
    '{mk("*11**"), mk("*10*0"), mk("**1*1"), '0, '0, '0, '0, '0}     // g6
  };

  // 1 when x lies in the cube.
  function automatic logic cube_hit(input cube_t c, input x_t x);
    return (x & c.care) == c.val;
  endfunction

  // OR of the first n cubes of a list.
  function automatic logic sop_eval(input cube_list_t l, input int unsigned n,
                                    input x_t x);
    logic r;
    r = 1'b0;
    for (int unsigned i = 0; i < MAXC; i++)
      if (i < n) r |= cube_hit(l[i], x);
    return r;
  endfunction

  // c1 and c2 parts of word j (0-based).
  function automatic c1_t word_c1(input int unsigned j);
    return WORDS[j][K_OUT-1 -: K1];
  endfunction

  function automatic c2_t word_c2(input int unsigned j);
    return WORDS[j][K2-1:0];
  endfunction

endpackage
