@0
4031
7FFE
@1fff
4126
