// pm_model: behavioural model of the program (main) memory behind the cache.
// Not synthesizable design content; it stands in for the external memory.
//
// Bundled-data four-phase slave: after pm_req rises it waits LAT clock
// cycles, puts the instruction for pm_addr on pm_inst and raises pm_ack;
// after pm_req falls it lowers pm_ack one cycle later and drives junk on
// pm_inst, so the cache must take the data while pm_ack is high.
// The memory content is a fixed function of the address (inst_of), so a
// checker can compute the expected instruction for any address.
module pm_model #(
  parameter int unsigned ADDR_W = 11,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned LAT    = 4
) (
  input  logic              clk,
  input  logic              pm_req,
  input  logic [ADDR_W-1:0] pm_addr,
  output logic              pm_ack,
  output logic [DATA_W-1:0] pm_inst
);

  int unsigned requests = 0;

  function automatic logic [DATA_W-1:0] inst_of(input logic [ADDR_W-1:0] a);
    return DATA_W'((32'(a) + 32'd1) * 32'h9E37_79B1) ^ DATA_W'(a);
  endfunction

  initial begin
    pm_ack  = 1'b0;
    pm_inst = '0;
    forever begin
      do @(posedge clk); while (!pm_req);
      requests++;
      repeat (LAT) @(posedge clk);
      pm_inst <= inst_of(pm_addr);
      pm_ack  <= 1'b1;
      do @(posedge clk); while (pm_req);
      @(posedge clk);
      pm_ack  <= 1'b0;
      pm_inst <= DATA_W'($urandom);
    end
  end

endmodule
