// join_pkg: record format shared by the database-join hardware (bitonic
// sorter, merge join, nested-loop join).
//
// A record is a signed 32-bit key (the join attribute, an OpenCL "int") and
// the record's position in its original table, so that a join of sorted
// tables can still report where each match came from. -99 marks an empty
// output slot, as in the document's nested-loop join. Index width is this
// design's choice (16 bits covers the 8192-row tables evaluated).
package join_pkg;

  localparam int unsigned KEY_W = 32;
  localparam int unsigned IDX_W = 16;

  typedef logic signed [KEY_W-1:0] key_t;
  typedef logic [IDX_W-1:0]        idx_t;

  typedef struct packed {
    key_t key;
    idx_t idx;
  } rec_t;

  localparam key_t HOLE = -32'sd99;

  // Compare-exchange rule of a bitonic network: returns 1 when the pair
  // (lo, hi) must be swapped to end up in the requested direction.
  function automatic logic need_swap(rec_t lo, rec_t hi, logic ascending);
    return ascending ? (lo.key > hi.key) : (lo.key < hi.key);
  endfunction

endpackage
