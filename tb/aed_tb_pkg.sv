// aed_tb_pkg -- reference model shared by the testbenches.
//
// Written independently of the RTL tables: the unit's function is the
// Karnaugh map of the example (columns x4x3x2 in Gray order, rows x1x0 in
// Gray order), and the characteristic functions are written out as plain
// Boolean expressions rather than cube lists.
package aed_tb_pkg;

  // Output words Y1..Y6 as (y4 y3 y2 y1 y0); index 0 unused.
  localparam logic [4:0] TB_WORDS [7] = '{5'b00000,
    5'b01011, 5'b00001, 5'b00101, 5'b10111, 5'b11010, 5'b11111};

  // Word number 1..6 the fault-free unit produces for input x.
  function automatic int kmap(input logic [4:0] x);
    // Map rows for x1x0 = 00, 01, 11, 10; each row lists the columns
    // x4x3x2 = 000 001 011 010 110 111 101 100.
    int rows [4][8] = '{
      '{4, 1, 5, 6, 3, 3, 5, 2},
      '{5, 6, 6, 5, 1, 5, 5, 1},
      '{2, 2, 5, 5, 5, 6, 5, 5},
      '{5, 1, 5, 5, 5, 6, 2, 5}
    };
    int r, c;
    case (x[1:0])
      2'b00: r = 0; 2'b01: r = 1; 2'b11: r = 2; default: r = 3;
    endcase
    case (x[4:2])
      3'b000: c = 0; 3'b001: c = 1; 3'b011: c = 2; 3'b010: c = 3;
      3'b110: c = 4; 3'b111: c = 5; 3'b101: c = 6; default: c = 7;
    endcase
    return rows[r][c];
  endfunction

  function automatic logic [4:0] f_ref(input logic [4:0] x);
    return TB_WORDS[kmap(x)];
  endfunction

  // Characteristic function g_j(x); minin selects the minimal-input set.
  function automatic logic g_ref(input int j, input logic [4:0] x, input bit minin);
    logic x3, x2, x1, x0;
    {x3, x2, x1, x0} = x[3:0];
    if (!minin) begin
      case (j)
        1: return (!x3 && x2 && !x0) || (!x2 && x0);
        2: return !x3;
        3: return x3;
        4: return !x3 && !x2 && !x0;
        5: return 1'b1;
        default: return (x3 && x1) || (x3 && !x0) || (x2 && x0);
      endcase
    end else begin
      case (j)
        1: return (!x3 && x2 && !x0) || (!x2 && x0);
        2: return !x3;
        3: return x3 && !x0;
        4: return !x3 && !x2 && !x0;
        5: return 1'b1;
        default: return (x3 && x2) || (x3 && !x2 && !x0) || (x2 && x0);
      endcase
    end
  endfunction

  // Rail of word j: Y1..Y3 on R0, Y4..Y6 on R1.
  function automatic bit rail_of(input int j);
    return j >= 4;
  endfunction

  // Expected rail output for checker input (x, y).
  function automatic logic r_ref(input bit rail, input logic [4:0] x,
                                 input logic [4:0] y, input bit minin);
    logic r;
    r = 1'b0;
    for (int j = 1; j <= 6; j++)
      if (rail_of(j) == rail && y == TB_WORDS[j] && g_ref(j, x, minin)) r = 1'b1;
    return r;
  endfunction

endpackage
