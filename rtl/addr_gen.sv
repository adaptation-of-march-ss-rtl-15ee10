// Address generator: ADDR_W-bit binary up/down counter.
//
// Produces the address sequence of a March element. init loads the first
// address of the next element, 0 when it ascends (init_up = 1) and
// 2**ADDR_W-1 when it descends (init_up = 0); en steps the counter by one in the direction ud at
// the rising clock edge (init has priority). last_addr is high while the
// counter holds the final address of the element in the current direction
// (all ones going up, zero going down); the controller uses it to leave a
// March element. Reset clears the counter. The up/down counter and its
// width follow the published design; the init input and last_addr flag are the
// interface chosen here.
module addr_gen #(
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ud,        // 1 = ascending, 0 = descending
  input  logic              init,
  input  logic              init_up,   // direction of the element init starts
  input  logic              en,
  output logic [ADDR_W-1:0] addr,
  output logic              last_addr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     addr <= '0;
    else if (init)  addr <= init_up ? '0 : '1;
    else if (en)    addr <= ud ? addr + 1'b1 : addr - 1'b1;
  end

  assign last_addr = ud ? (addr == '1) : (addr == '0);

endmodule
