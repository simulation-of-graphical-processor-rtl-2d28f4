// data_base: scene data base memory.
//
// The scene processor reads its objects from a data base. Here the data base
// is a synchronous single-port-write, single-port-read RAM of DEPTH words of
// type T: the host writes through we / waddr / wdata, the scene manager
// reads through re / raddr, and rdata holds the addressed word from the
// clock edge after re until the next read. The scene processor uses two
// instances: the object table (position vector and bounding radius per
// object) and the plane-normal table (K normals per object). The
// organisation of the data base is this design's choice; the description
// only names it. The contents are not reset.
module data_base #(
  parameter type T     = sp_pkg::obj_rec_t,
  parameter int  DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  T                         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output T                         rdata
);

  T mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
