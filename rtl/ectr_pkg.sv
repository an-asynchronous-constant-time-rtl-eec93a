// ectr_pkg: types shared by the empty-pipeline counter blocks.
//
// Every asynchronous channel of the design is carried here as a
// clocked valid/ready handshake: a transfer happens on a rising clock edge
// where both valid and ready are high, and valid (with its data) must not
// drop before that transfer. The only data a counter command carries is its
// direction, encoded by cnt_op_e.
package ectr_pkg;

  // Direction of a counter update (C_Inc / C_Dec, IncU / DecU).
  typedef enum logic {
    OP_INC = 1'b0,
    OP_DEC = 1'b1
  } cnt_op_e;

endpackage
