// ppa_pkg: shared types and prefix-structure tables for the parallel prefix adders.
//
// A prefix structure is written as a matrix of source columns, one row per level of the
// prefix network and one entry per bit column. For row r and bit column i the entry is the
// column, in the row above, whose group signals bit column i combines with its own. An entry
// equal to i means column i only passes its group signals down (a buffer, no prefix node).
// Rows are listed from the first level down; within a row the entries run from the most
// significant column (N-1) on the left to column 0 on the right, the same way the dot
// diagrams of prefix adders are drawn. This encoding, the left-to-right order and the
// structures themselves follow the original report; the names of the constants are this
// design's own.
package ppa_pkg;

  // ---------------------------------------------------------------------------------------
  // 16-bit structures
  // ---------------------------------------------------------------------------------------

  // Structure A: 4 levels, 39 nodes. Staggered pairs: every level after the first joins two
  // neighbouring columns to two other neighbouring columns.
  localparam int unsigned STRUCT_A_SRC [0:3][15:0] = '{
    '{14,13,12,11,10, 9, 8, 7, 6, 5, 4, 3, 2, 1, 0, 0},
    '{13,12,13,12, 9, 8, 9, 8, 5, 4, 5, 4, 1, 0, 1, 0},
    '{11,10,11,10,11,10, 9, 8, 3, 2, 3, 2, 3, 2, 1, 0},
    '{ 7, 6, 7, 6, 7, 6, 7, 6, 7, 6, 5, 4, 3, 2, 1, 0}
  };

  // Modified Structure A: Structure A with the level-3 nodes of columns 5 and 4 moved to
  // level 4, which lowers the branch effort on the critical path. 4 levels, 39 nodes.
  localparam int unsigned STRUCT_MOD_A_SRC [0:3][15:0] = '{
    '{14,13,12,11,10, 9, 8, 7, 6, 5, 4, 3, 2, 1, 0, 0},
    '{13,12,13,12, 9, 8, 9, 8, 5, 4, 5, 4, 1, 0, 1, 0},
    '{11,10,11,10,11,10, 9, 8, 3, 2, 5, 4, 3, 2, 1, 0},
    '{ 7, 6, 7, 6, 7, 6, 7, 6, 7, 6, 3, 2, 3, 2, 1, 0}
  };

  // Structure C: Brent-Kung style adder that saves the node that would form 15:8; column 15
  // takes 11:0 directly. 25 nodes in 6 rows.
  localparam int unsigned STRUCT_C_SRC [0:5][15:0] = '{
    '{14,14,12,12,10,10, 8, 8, 6, 6, 4, 4, 2, 2, 0, 0},
    '{13,14,13,12, 9,10, 9, 8, 5, 6, 5, 4, 1, 2, 1, 0},
    '{15,14,13,12,11,10, 9, 8, 3, 6, 5, 4, 3, 2, 1, 0},
    '{15,14,13,12, 7,10, 9, 8, 7, 6, 5, 4, 3, 2, 1, 0},
    '{11,14,11,12,11,10, 7, 8, 7, 6, 3, 4, 3, 2, 1, 0},
    '{15,13,13,11,11, 9, 9, 7, 7, 5, 5, 3, 3, 1, 1, 0}
  };

  // Structure D: 5 levels, 39 nodes. Columns 13,12 and 5,4 build their groups early so the
  // fourth level can close 7:0 and 6:0 while it builds 15:8 and 14:7.
  localparam int unsigned STRUCT_D_SRC [0:4][15:0] = '{
    '{14,13,12,11,10, 9, 8, 7, 6, 5, 4, 3, 2, 1, 0, 0},
    '{15,14,11,10,11,10, 9, 8, 7, 6, 3, 2, 3, 2, 1, 0},
    '{15,14, 9, 8,11,10, 9, 8, 7, 6, 1, 0, 3, 2, 1, 0},
    '{13,12,13,12, 9, 8, 9, 8, 5, 4, 5, 4, 1, 0, 1, 0},
    '{ 7, 6, 7, 6, 7, 6, 7, 6, 7, 6, 5, 4, 3, 2, 1, 0}
  };

  // Modified Ladner-Fischer: compared with the minimum-depth Ladner-Fischer adder, the node
  // that forms 2:0 moves from level 2 to level 3 and the nodes that form 6:0, 5:0 and 4:0
  // move from level 3 to level 4, with buffers in their place. 4 levels, 32 nodes.
  localparam int unsigned STRUCT_MOD_LF_SRC [0:3][15:0] = '{
    '{14,14,12,12,10,10, 8, 8, 6, 6, 4, 4, 2, 2, 0, 0},
    '{13,13,13,12, 9, 9, 9, 8, 5, 5, 5, 4, 1, 2, 1, 0},
    '{11,11,11,11,11,10, 9, 8, 3, 6, 5, 4, 3, 1, 1, 0},
    '{ 7, 7, 7, 7, 7, 7, 7, 7, 7, 3, 3, 3, 3, 2, 1, 0}
  };

  // ---------------------------------------------------------------------------------------
  // 8-bit structures found by the exhaustive search
  // ---------------------------------------------------------------------------------------
  // Names give (fanout metric, nodes) for the first study, or (delay, area*power) for the
  // second. Three-level structures come first, then the four-level ones.
  typedef enum int unsigned {
    S8_FO2P5_N14_1,   // (2.5, 14) structure 1
    S8_FO2P5_N14_2,   // (2.5, 14) structure 2
    S8_FO4P3_N13_1,   // (4.3, 13) structure 1
    S8_FO4P3_N13_2,   // (4.3, 13) structure 2, also the (7.56, 299) structure
    S8_FO4P3_N13_3,   // (4.3, 13) structure 3
    S8_FO2P3_N15_1,   // (2.3, 15) structure 1
    S8_FO2P3_N15_2,   // (2.3, 15) structure 2, also the (6.87, 405) structure
    S8_FO2P3_N15_3,   // (2.3, 15) structure 3
    S8_D8P14_AP240,   // (8.14, 240): Ladner-Fischer with the 2:0 node moved to level 3
    S8_FO1_N11_1,     // (1, 11) structure 1
    S8_FO1_N11_2,     // (1, 11) structure 2
    S8_FO1_N11_3,     // (1, 11) structure 3, also the (8.00, 176) structure
    S8_FO1_N11_4,     // (1, 11) structure 4
    S8_FO1_N11_5,     // (1, 11) structure 5
    S8_FO1_N11_6,     // (1, 11) structure 6
    S8_FO2P2_N10_1,   // (2.2, 10) structure 1, also the (8.85, 130) structure
    S8_D6P73_AP405,   // (6.73, 405)
    S8_D7P44_AP286    // (7.44, 286)
  } ppa8_e;

  localparam int unsigned PPA8_COUNT = 18;
  localparam int unsigned PPA8_THREE_LEVEL = 9;   // entries below this index have 3 levels

  localparam int unsigned S8_3LVL_SRC [0:8][0:2][7:0] = '{
    '{'{6,6,4,3,2,2,0,0}, '{5,5,3,4,1,1,1,0}, '{3,3,1,2,3,2,1,0}},   // (2.5,14) 1
    '{'{6,5,4,3,2,2,0,0}, '{5,4,5,4,1,1,1,0}, '{3,2,3,2,3,2,1,0}},   // (2.5,14) 2
    '{'{6,6,4,4,2,2,0,0}, '{5,5,3,4,1,2,1,0}, '{3,3,1,3,3,1,1,0}},   // (4.3,13) 1
    '{'{6,6,4,4,2,2,0,0}, '{5,5,5,3,1,2,1,0}, '{3,3,3,1,3,1,1,0}},   // (4.3,13) 2
    '{'{6,6,4,3,2,2,0,0}, '{5,5,5,4,1,1,1,0}, '{3,3,3,2,3,2,1,0}},   // (4.3,13) 3
    '{'{6,5,4,3,2,2,0,0}, '{5,4,3,4,1,1,1,0}, '{3,2,1,2,3,2,1,0}},   // (2.3,15) 1
    '{'{6,5,4,3,2,1,0,0}, '{5,4,5,4,1,0,1,0}, '{3,2,3,2,3,2,1,0}},   // (2.3,15) 2
    '{'{6,6,4,3,2,1,0,0}, '{5,5,3,4,1,0,1,0}, '{3,3,1,2,3,2,1,0}},   // (2.3,15) 3
    '{'{6,6,4,4,2,2,0,0}, '{5,5,5,4,1,2,1,0}, '{3,3,3,3,3,1,1,0}}    // (8.14,240)
  };

  localparam int unsigned S8_4LVL_SRC [0:8][0:3][7:0] = '{
    '{'{7,6,4,4,2,2,0,0}, '{7,5,3,4,1,2,1,0}, '{7,3,5,4,3,1,1,0}, '{6,6,1,3,3,2,1,0}}, // (1,11) 1
    '{'{7,6,4,4,2,2,0,0}, '{7,5,5,3,1,2,1,0}, '{7,3,5,1,3,2,1,0}, '{6,6,3,4,3,1,1,0}}, // (1,11) 2
    '{'{7,6,4,3,2,2,0,0}, '{7,5,5,4,1,2,1,0}, '{7,3,5,4,3,1,1,0}, '{6,6,3,2,3,2,1,0}}, // (1,11) 3
    '{'{7,5,5,3,3,2,0,0}, '{7,4,5,2,3,1,1,0}, '{7,2,5,1,3,2,1,0}, '{6,6,4,4,2,2,1,0}}, // (1,11) 4
    '{'{7,5,5,4,2,2,0,0}, '{7,4,5,3,1,2,1,0}, '{7,3,5,1,3,2,1,0}, '{6,6,4,4,3,1,1,0}}, // (1,11) 5
    '{'{7,6,4,4,2,2,0,0}, '{7,5,3,4,1,2,1,0}, '{7,3,1,4,3,2,1,0}, '{6,6,5,3,3,1,1,0}}, // (1,11) 6
    '{'{6,6,4,4,2,2,0,0}, '{7,6,5,4,1,2,1,0}, '{7,6,3,4,3,2,1,0}, '{5,5,5,3,3,1,1,0}}, // (2.2,10) 1
    '{'{6,5,4,3,2,1,0,0}, '{7,6,3,2,3,2,1,0}, '{7,6,1,0,3,2,1,0}, '{5,4,5,4,1,0,1,0}}, // (6.73,405)
    '{'{6,6,4,3,2,1,0,0}, '{7,6,3,4,3,0,1,0}, '{7,6,1,4,3,2,1,0}, '{5,5,5,2,1,2,1,0}}  // (7.44,286)
  };

endpackage
