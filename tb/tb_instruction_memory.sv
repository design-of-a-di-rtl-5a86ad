// tb_instruction_memory: 64 x 32 store. Writes every row with a random word,
// then reads each row through its one-hot word line, reads with no word line
// (must give 0), overwrites random rows and reads them back, all against a
// model array.
module tb_instruction_memory;
  localparam int unsigned ROWS = 64, DATA_W = 32;
  logic clk = 0, we = 0;
  logic [5:0]        widx = '0;
  logic [DATA_W-1:0] wdata = '0, rdata;
  logic [ROWS-1:0]   sel = '0;
  logic [DATA_W-1:0] model [ROWS];
  int checks = 0, failures = 0;

  instruction_memory #(.ROWS(ROWS), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = !clk;

  task automatic write(input int r, input logic [DATA_W-1:0] v);
    @(negedge clk); we = 1; widx = 6'(r); wdata = v;
    @(negedge clk); we = 0;
    model[r] = v;
  endtask

  task automatic read(input int r);
    sel = '0; sel[r] = 1'b1; #1;
    checks++;
    if (rdata !== model[r]) begin failures++; $display("FAIL row %0d got %h exp %h", r, rdata, model[r]); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) write(r, $urandom);
    for (int r = 0; r < ROWS; r++) read(r);
    sel = '0; #1;
    checks++; if (rdata !== '0) begin failures++; $display("FAIL no word line"); end
    for (int n = 0; n < 300; n++) begin
      int r = $urandom % ROWS;
      write(r, $urandom);
      read(r);
      read($urandom % ROWS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
