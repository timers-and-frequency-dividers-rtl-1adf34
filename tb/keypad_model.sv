// keypad_model: behavioural model of a 4x4 matrix keypad with pulled-up
// columns, for testbenches only.
//
// Each key joins one row line to one column line while it is pressed. A
// column reads low when some pressed key joins it to a row that is driven
// low, and high (through its pull-up) otherwise. `key[r][c]` is the key on
// row r and column c. The model has no contact bounce of its own; a test
// makes bounce by toggling `key`.
module keypad_model (
  input  logic [3:0]      row,
  input  logic [3:0][3:0] key,
  output logic [3:0]      col
);
  always_comb begin
    for (int c = 0; c < 4; c++) begin
      col[c] = 1'b1;
      for (int r = 0; r < 4; r++)
        if (key[r][c] && !row[r]) col[c] = 1'b0;
    end
  end
endmodule
