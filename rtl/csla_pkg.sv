// csla_pkg: constants shared by the modified square-root carry select adders.
//
// The 16-bit adder is split into groups of 2, 2, 3, 4 and 5 bits
// ([1:0], [3:2], [6:4], [10:7], [15:11]). The group sizes grow by one bit per
// group so that a group's own ripple addition finishes about when the carry
// from below reaches its mux: the "square root" sizing. Group 0 is a plain
// ripple adder that takes the adder's carry in; every other group is a
// csla_bec_group.
package csla_pkg;
  localparam int unsigned SLICE_W  = 16;
  localparam int unsigned N_GROUPS = 5;

  typedef int unsigned group_arr_t [N_GROUPS];

  localparam group_arr_t GROUP_LSB   = '{0, 2, 4, 7, 11};
  localparam group_arr_t GROUP_WIDTH = '{2, 2, 3, 4, 5};
endpackage
