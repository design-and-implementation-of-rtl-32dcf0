// Tag comparator: tells whether the tag field of an address equals the tag
// stored in the tag array, and whether that block is present at all.
//
// The comparator is one of the four parts of each cache level in the design
// description; folding the "block is valid" check (state not I) into it is
// this design's choice, so that every lookup needs only its output `hit`.
// Purely combinational.
module tag_comparator #(
  parameter int unsigned TAG_W = 4
) (
  input  logic [TAG_W-1:0] addr_tag,    // tag field of the looked-up address
  input  logic [TAG_W-1:0] stored_tag,  // tag read from the tag array
  input  logic             valid,       // stored block state is not I
  output logic             equal,       // tags are equal
  output logic             hit          // tags equal and block valid
);
  always_comb begin
    equal = (addr_tag == stored_tag);
    hit   = equal && valid;
  end
endmodule
